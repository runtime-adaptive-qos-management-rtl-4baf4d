// tb_sr_flows_4x5: the synthetic flow-adaptation scenario on a 4-column by
// 5-row mesh forming one cluster, with the master at PE3 (bottom-right tile,
// the default master position). Routers carry their labels along the
// snake: PE0-PE3 on the bottom row, PE4-PE7 right to left above it, and so
// on up to PE0x13 at the top right.
//
// Two monitored flows, S1 (PE0x12) -> R1 (PE2) and S2 (PE0x10) -> R2 (PE0xA),
// start at LOW priority and keep a fixed latency deadline. After a warm-up
// phase, four disturbing producers start LOW traffic towards two hot spots
// (T1 PE0x13 and T2 PE0xD to MEM at PE5, T3 PE0xF and T4 PE0xE to OUT at
// PE0xC). The testbench plays every processor: producers follow the
// adaptation orders of the cluster (HIGH sets the priority bit; CS opens a
// circuit and sends circuit data; the return to HIGH releases it). When the
// disturbance stops, the time-outs bring both flows back to LOW.
// The adaptation timers are shortened (window 50 cycles, FCt 300, CSt 600).
//
// Checks: no latency event during warm-up; both flows escalate LOW -> HIGH
// -> CS and return CS -> HIGH -> LOW; both flows are in circuit mode at the
// same time and both circuits open; every packet arrives intact; the mean header latency of the
// monitored flows on a circuit is lower than at LOW priority under the same
// disturbance; no circuit stays reserved.
module tb_sr_flows_4x5;
  import qos_pkg::*;

  localparam int MW = 4, MH = 5, NPE = MW * MH, NCL = 1;
  localparam int DEADLINE = 40;   // cycles, header latency

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]                cur_time;
  logic  [NPE-1:0]            pe_tx_valid, pe_send_av, pe_rx_valid, pe_rx_ready;
  flit_t [NPE-1:0]            pe_tx_flit, pe_rx_flit;
  logic  [NPE-1:0]            cs_out_open, cs_in_open;
  logic  [NPE-1:0][15:0]      mon_sent, mon_drop;
  logic  [NPE-1:0][NPORT-1:0] cs_reserved;
  logic  [NCL-1:0]            cfg_valid;
  logic  [1:0]                cfg_idx;
  logic                       cfg_enable;
  logic  [31:0]               cfg_producer, cfg_consumer, cfg_lat, cfg_thr, cfg_res;
  logic  [NCL-1:0]            ev_valid, ev_thr, cs_path_ok, ord_valid, comp_valid;
  logic  [NCL-1:0][1:0]       ev_ctp, ord_ctp, ord_mode, comp_ctp;
  logic  [NCL-1:0][3:0][1:0]  flow_mode;

  qd_hemps_mpsoc #(
    .MESH_W(MW), .MESH_H(MH), .CLUSTER_W(MW), .CLUSTER_H(MH),
    .WINDOW(50), .FCT(300), .CST(600)
  ) dut (
    .clk, .rst_n, .cur_time,
    .pe_tx_valid, .pe_tx_flit, .pe_send_av, .pe_rx_valid, .pe_rx_flit, .pe_rx_ready,
    .cs_out_open, .cs_in_open, .mon_sent_cnt(mon_sent), .mon_drop_cnt(mon_drop),
    .cs_reserved,
    .cfg_valid, .cfg_idx, .cfg_enable, .cfg_producer, .cfg_consumer,
    .cfg_lat_deadline(cfg_lat), .cfg_thr_deadline(cfg_thr), .cfg_resolution(cfg_res),
    .ev_valid, .ev_throughput(ev_thr), .ev_ctp, .cs_path_ok,
    .ord_valid, .ord_ctp, .ord_mode, .comp_req_valid(comp_valid), .comp_req_ctp(comp_ctp),
    .flow_mode
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at t=%0d", what, cur_time); end
  endtask

  // snake label -> tile index (y * MW + x)
  function automatic int pe(input int label);
    int y, x;
    y = label / MW;
    x = (y % 2 == 0) ? label % MW : MW - 1 - label % MW;
    return y * MW + x;
  endfunction

  int S [2], R [2];
  initial begin
    S[0] = pe('h12); R[0] = pe('h2);
    S[1] = pe('h10); R[1] = pe('hA);
  end

  // ---------------- processor models: sending ----------------
  flit_t txq [NPE][$];
  string sent_pkts [NPE][NPE][$];
  function automatic string pack(flit_t f [$]);
    string s;
    s = "";
    foreach (f[i]) s = {s, $sformatf("%04h", f[i])};
    return s;
  endfunction
  int seq = 0;

  function automatic flit_t mk_hdr(bit prio, bit mon, sw_e sw, service_e srv, int dst);
    header_t h;
    h = '0; h.prio = prio; h.mon = mon; h.sw = sw; h.srv = srv;
    h.x = 4'(dst % MW); h.y = 4'(dst / MW);
    return flit_t'(h);
  endfunction

  task automatic send_data(input int src, input int dst, input bit prio, input bit mon,
                           input sw_e sw, input int n);
    flit_t f [$];
    logic [31:0] ts;
    ts = cur_time;
    f = {mk_hdr(prio, mon, sw, SRV_MSG_DELIV, dst), 16'(6 + n), ts[31:16], ts[15:0],
         16'h0, 16'(src), 16'h0, 16'(dst)};
    for (int i = 0; i < n; i++) f.push_back(16'(seq * 5 + i));
    seq++;
    foreach (f[i]) txq[src].push_back(f[i]);
    sent_pkts[src][dst].push_back(pack(f));
  endtask

  task automatic send_ctrl(input int src, input int dst, input sw_e sw);
    txq[src].push_back(mk_hdr(1, 0, sw, SRV_OTHER, dst));
    txq[src].push_back(16'd0);
  endtask

  always @(negedge clk) begin
    for (int t = 0; t < NPE; t++) begin
      pe_tx_valid[t] = txq[t].size() > 0;
      pe_tx_flit[t]  = pe_tx_valid[t] ? txq[t][0] : '0;
    end
  end
  always @(posedge clk) begin
    for (int t = 0; t < NPE; t++)
      if (pe_tx_valid[t] && pe_send_av[t]) void'(txq[t].pop_front());
  end

  // ---------------- processor models: receiving ----------------
  flit_t rxbuf [NPE][$];
  int    rx_need [NPE];
  int    hdr_time [NPE];
  int    delivered = 0, bad = 0;
  bit    disturbed = 0;
  // header latency sums of the monitored flows under disturbance, per mode
  longint lat_sum [3];
  int     lat_n [3];
  logic [1:0] mode_of [2] = '{2'd0, 2'd0};

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NPE; t++) begin
      if (pe_rx_valid[t] && pe_rx_ready[t]) begin
        if (rxbuf[t].size() == 0) hdr_time[t] = int'(cur_time);
        rxbuf[t].push_back(pe_rx_flit[t]);
        if (rxbuf[t].size() == 2) rx_need[t] = 2 + int'(pe_rx_flit[t]);
        if (rxbuf[t].size() >= 2 && rxbuf[t].size() == rx_need[t]) begin
          header_t h;
          h = header_t'(rxbuf[t][0]);
          if (h.srv == SRV_MSG_DELIV) begin
            int src, idx, m;
            string p;
            src = int'(rxbuf[t][5]);
            p = pack(rxbuf[t]);
            idx = -1;
            if (src < NPE)
              foreach (sent_pkts[src][t][k]) if (idx < 0 && sent_pkts[src][t][k] == p) idx = k;
            if (idx < 0) begin
              bad++;
              $display("FAIL: unexpected packet at tile %0d: %s", t, p);
            end else begin
              sent_pkts[src][t].delete(idx);
              delivered++;
              if (h.mon && disturbed) begin
                m = (h.sw == SW_CS_DATA) ? 2 : (h.prio ? 1 : 0);
                lat_sum[m] += hdr_time[t] - int'({rxbuf[t][2], rxbuf[t][3]});
                lat_n[m]++;
              end
            end
          end
          rxbuf[t].delete();
        end
      end
    end
  end
  initial pe_rx_ready = '1;

  // ---------------- adaptation orders ----------------
  int  n_ord [2][3];       // orders per flow and mode
  int  lat_events = 0, warm_events = 0;
  bit  warm = 1;
  bit  both_cs = 0;
  bit  cs_seen [2] = '{0, 0};
  int  cs_back_high [2];
  always @(posedge clk) if (rst_n) begin
    if (ev_valid[0] && !ev_thr[0]) begin
      lat_events++;
      if (warm) warm_events++;
    end
    if (ord_valid[0] && ord_ctp[0] < 2) begin
      n_ord[ord_ctp[0]][ord_mode[0]]++;
      if (ord_mode[0] == 2'd1 && mode_of[ord_ctp[0]] == 2'd2) cs_back_high[ord_ctp[0]]++;
      mode_of[ord_ctp[0]] = ord_mode[0];
    end
    if (mode_of[0] == 2'd2 && mode_of[1] == 2'd2) both_cs = 1;
    for (int f = 0; f < 2; f++) if (cs_out_open[S[f]]) cs_seen[f] = 1;
  end

  bit circuit [2] = '{0, 0};
  task automatic flow_packet(input int f);
    if (mode_of[f] == 2'd2) begin
      if (!circuit[f]) begin
        send_ctrl(S[f], R[f], SW_CS_OPEN);
        circuit[f] = 1'b1;
      end
      send_data(S[f], R[f], 1, 1, SW_CS_DATA, 8);
    end else begin
      if (circuit[f]) begin
        send_ctrl(S[f], R[f], SW_CS_REL);
        circuit[f] = 1'b0;
      end
      send_data(S[f], R[f], mode_of[f] != 2'd0, 1, SW_PS, 8);
    end
  endtask

  task automatic configure(input int idx, input int prod, input int cons, input int lat);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_idx = 2'(idx); cfg_enable = 1'b1;
    cfg_producer = prod; cfg_consumer = cons; cfg_lat = lat; cfg_thr = 0; cfg_res = 0;
    @(negedge clk);
    cfg_valid = '0;
  endtask

  int T_SRC [4], T_DST [4];
  bit stop_flows = 0, stop_dist = 0;
  initial begin
    cfg_valid = '0; cfg_idx = '0; cfg_enable = 0; cfg_producer = 0; cfg_consumer = 0;
    cfg_lat = 0; cfg_thr = 0; cfg_res = 0; cs_path_ok = '1;
    T_SRC = '{pe('h13), pe('hD), pe('hF), pe('hE)};
    T_DST = '{pe('h5), pe('h5), pe('hC), pe('hC)};
    repeat (4) @(posedge clk);
    rst_n = 1;
    configure(0, S[0], R[0], DEADLINE);
    configure(1, S[1], R[1], DEADLINE);

    fork
      // the two monitored flows, one packet every 50 cycles each
      begin
        while (!stop_flows) begin
          flow_packet(0);
          flow_packet(1);
          repeat (50) @(posedge clk);
        end
      end
      // warm-up, then disturbing traffic
      begin
        repeat (1000) @(posedge clk);
        warm = 0;
        disturbed = 1;
        for (int k = 0; k < 300 && !stop_dist; k++) begin
          for (int j = 0; j < 4; j++)
            if (txq[T_SRC[j]].size() < 60) send_data(T_SRC[j], T_DST[j], 0, 0, SW_PS, 16);
          repeat (12) @(posedge clk);
        end
        disturbed = 0;
        // flows keep running undisturbed until both are back to LOW
        for (int w = 0; w < 200 && (mode_of[0] != 2'd0 || mode_of[1] != 2'd0); w++)
          repeat (50) @(posedge clk);
        stop_flows = 1;
      end
    join
    repeat (600) @(posedge clk);

    begin
      int left;
      left = 0;
      for (int s = 0; s < NPE; s++) for (int d = 0; d < NPE; d++) left += sent_pkts[s][d].size();
      check(left == 0, $sformatf("all data packets delivered (%0d missing)", left));
    end
    check(bad == 0, "no corrupted or misrouted packet");
    check(warm_events == 0, $sformatf("no latency event before the disturbance (%0d)", warm_events));
    for (int f = 0; f < 2; f++) begin
      check(n_ord[f][1] >= 1 && n_ord[f][2] >= 1,
            $sformatf("flow SR%0d raised to HIGH and to CS (%0d/%0d)", f + 1, n_ord[f][1], n_ord[f][2]));
      check(cs_back_high[f] >= 1 && mode_of[f] == 2'd0 && flow_mode[0][f] == 2'd0,
            $sformatf("flow SR%0d back to HIGH after CSt, then LOW", f + 1));
    end
    check(both_cs, "both flows in circuit mode at the same time");
    check(cs_seen[0] && cs_seen[1], "both circuits were opened");
    $display("mean header latency under disturbance: LOW %0d (%0d pkts), HIGH %0d (%0d), CS %0d (%0d)",
             lat_n[0] ? lat_sum[0] / lat_n[0] : 0, lat_n[0], lat_n[1] ? lat_sum[1] / lat_n[1] : 0, lat_n[1],
             lat_n[2] ? lat_sum[2] / lat_n[2] : 0, lat_n[2]);
    check(lat_n[0] > 0 && lat_n[2] > 0 && lat_sum[2] * lat_n[0] < lat_sum[0] * lat_n[2],
          "circuit latency below LOW latency under disturbance");
    check(cs_reserved == '0, "no circuit left reserved");
    $display("latency events %0d, orders SR1 H/CS %0d/%0d, SR2 H/CS %0d/%0d", lat_events,
             n_ord[0][1], n_ord[0][2], n_ord[1][1], n_ord[1][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
