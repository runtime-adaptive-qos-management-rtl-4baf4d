// tb_qd_hemps_mpsoc: end-to-end test of the 4x4 fabric (four 2x2 clusters)
// with the adaptation timers shortened (window 50 cycles, FCt 150, CSt 300)
// so that a whole adaptation cycle fits in a short simulation.
//
// The testbench plays every processor. A monitored producer/consumer pair
// (tile 15 -> tile 0, pair 0 of cluster 0, whose master is tile 1) sends packets with a latency
// deadline so tight that each one is a violation; background tiles send
// LOW and HIGH traffic across the mesh, and one receiver stalls at random.
// Adaptation orders from cluster 0 are applied to the producer as its
// software would: HIGH sets the priority bit, CS opens a circuit and sends
// circuit data, the return to HIGH releases it. After the pair goes quiet
// the time-outs bring it back to LOW. Pair 1 of cluster 0 never receives
// traffic and must raise a throughput event.
//
// Every delivered data packet is matched against what was sent. Each
// mechanism is counted and must occur at least once: LOW and HIGH delivery,
// adaptive detour on channel 0, HIGH fall-back to channel 1, receiver stall,
// report/PE multiplexing at the NI, monitoring reports, latency and
// throughput events, escalation to HIGH and CS, circuit data, release and
// both time-outs.
module tb_qd_hemps_mpsoc;
  import qos_pkg::*;

  localparam int MW = 4, MH = 4, NPE = MW * MH, NCL = 4;
  localparam int PROD = 15, CONS = 0;

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
    .MESH_W(MW), .MESH_H(MH), .CLUSTER_W(2), .CLUSTER_H(2),
    .WINDOW(50), .FCT(150), .CST(300)
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

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_LOW, M_HIGH, M_DETOUR, M_FALLBACK, M_STALL, M_MONMUX, M_REPORT, M_LAT_EV,
    M_THR_EV, M_TO_HIGH, M_TO_CS, M_CS_DATA, M_CS_REL, M_CS_TIMEOUT, M_HIGH_TIMEOUT, M_N
  } mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"LOW delivery", "HIGH delivery", "adaptive detour",
    "channel-1 fall-back", "receiver stall", "report/PE mux", "monitoring report",
    "latency event", "throughput event", "escalation to HIGH", "escalation to CS",
    "circuit data", "circuit release", "CS time-out", "HIGH time-out"};

  // router-internal observation: detours and fall-backs
  for (genvar gy = 0; gy < MH; gy++) begin : g_oy
    for (genvar gx = 0; gx < MW; gx++) begin : g_ox
      always @(posedge clk) if (rst_n) begin
        if (dut.g_y[gy].g_x[gx].u_router.grant && dut.g_y[gy].g_x[gx].u_router.ch == 0 &&
            !dut.g_y[gy].g_x[gx].u_router.here &&
            !dut.g_y[gy].g_x[gx].u_router.cs_in[dut.g_y[gy].g_x[gx].u_router.req_sel]) begin
          if (dut.g_y[gy].g_x[gx].u_router.grant_out[0] == 1'b1) mech[M_FALLBACK]++;
          else if (int'(dut.g_y[gy].g_x[gx].u_router.grant_out) / 2 !=
                   int'(dut.g_y[gy].g_x[gx].u_router.det)) mech[M_DETOUR]++;
        end
        if (dut.g_y[gy].g_x[gx].u_ni.o_busy && dut.g_y[gy].g_x[gx].u_ni.o_src_mon &&
            pe_tx_valid[gy*MW+gx]) mech[M_MONMUX]++;
      end
    end
  end

  // ---------------- processor models: sending ----------------
  flit_t txq [NPE][$];
  // packets in flight per (source, destination), kept as hex strings
  string sent_pkts [NPE][NPE][$];
  function automatic string pack(flit_t f [$]);
    string s;
    s = "";
    foreach (f[i]) s = {s, $sformatf("%04h", f[i])};
    return s;
  endfunction
  int    seq = 0;

  function automatic flit_t mk_hdr(bit prio, bit mon, sw_e sw, service_e srv, int dst);
    header_t h;
    h = '0; h.prio = prio; h.mon = mon; h.sw = sw; h.srv = srv;
    h.x = 4'(dst % MW); h.y = 4'(dst / MW);
    return flit_t'(h);
  endfunction

  // data packet: header, size, timestamp, producer, consumer, n payload flits
  task automatic send_data(input int src, input int dst, input bit prio, input bit mon,
                           input sw_e sw, input int n);
    flit_t f [$];
    logic [31:0] ts;
    ts = cur_time;
    f = {mk_hdr(prio, mon, sw, SRV_MSG_DELIV, dst), 16'(6 + n), ts[31:16], ts[15:0],
         16'h0, 16'(src), 16'h0, 16'(dst)};
    for (int i = 0; i < n; i++) f.push_back(16'(seq * 7 + i));
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
  int    delivered = 0, bad = 0;

  always @(negedge clk) begin
    for (int t = 0; t < NPE; t++) pe_rx_ready[t] = (t == 2) ? ($urandom_range(0, 1) == 1) : 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NPE; t++) begin
      if (t == 2 && pe_rx_valid[t] && !pe_rx_ready[t]) mech[M_STALL]++;
      if (pe_rx_valid[t] && pe_rx_ready[t]) begin
        rxbuf[t].push_back(pe_rx_flit[t]);
        if (rxbuf[t].size() == 2) rx_need[t] = 2 + int'(pe_rx_flit[t]);
        if (rxbuf[t].size() >= 2 && rxbuf[t].size() == rx_need[t]) begin
          header_t h;
          h = header_t'(rxbuf[t][0]);
          if (h.srv == SRV_MSG_DELIV) begin
            int src, idx;
            string p;
            src = int'(rxbuf[t][5]);
            p = pack(rxbuf[t]);
            idx = -1;
            if (src < NPE)
              foreach (sent_pkts[src][t][k]) if (idx < 0 && sent_pkts[src][t][k] == p) idx = k;
            if (idx < 0 || int'(rxbuf[t][7]) != t) begin
              bad++;
              $display("FAIL: unexpected packet at tile %0d: %s", t, p);
            end else begin
              sent_pkts[src][t].delete(idx);
              delivered++;
              if (h.prio) mech[M_HIGH]++; else mech[M_LOW]++;
              if (h.sw == SW_CS_DATA) mech[M_CS_DATA]++;
            end
          end else if (h.srv == SRV_MON_REPORT) begin
            mech[M_REPORT]++;
          end
          rxbuf[t].delete();
        end
      end
    end
  end

  // ---------------- cluster 0 events and orders ----------------
  logic [1:0] prod_mode = 2'd0;
  logic       circuit_open = 1'b0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCL; c++) begin
      if (ev_valid[c] && !ev_thr[c]) mech[M_LAT_EV]++;
      if (ev_valid[c] && ev_thr[c]) mech[M_THR_EV]++;
    end
    if (ord_valid[0] && ord_ctp[0] == 2'd0) begin
      if (ord_mode[0] == 2'd1 && prod_mode == 2'd0) mech[M_TO_HIGH]++;
      if (ord_mode[0] == 2'd2) mech[M_TO_CS]++;
      if (ord_mode[0] == 2'd1 && prod_mode == 2'd2) mech[M_CS_TIMEOUT]++;
      if (ord_mode[0] == 2'd0) mech[M_HIGH_TIMEOUT]++;
      prod_mode <= ord_mode[0];
    end
  end

  // producer software: one packet for the pair, following the current mode
  task automatic producer_packet();
    if (prod_mode == 2'd2) begin
      if (!circuit_open) begin
        send_ctrl(PROD, CONS, SW_CS_OPEN);
        circuit_open = 1'b1;
      end
      send_data(PROD, CONS, 1, 1, SW_CS_DATA, 6);
    end else begin
      if (circuit_open) begin
        send_ctrl(PROD, CONS, SW_CS_REL);
        circuit_open = 1'b0;
        mech[M_CS_REL]++;
      end
      send_data(PROD, CONS, prod_mode != 2'd0, 1, SW_PS, 6);
    end
  endtask

  task automatic configure(input int cl, input int idx, input int prod, input int cons,
                           input int lat, input int thr, input int res);
    @(negedge clk);
    cfg_valid = '0; cfg_valid[cl] = 1'b1; cfg_idx = 2'(idx); cfg_enable = 1'b1;
    cfg_producer = prod; cfg_consumer = cons; cfg_lat = lat; cfg_thr = thr; cfg_res = res;
    @(negedge clk);
    cfg_valid = '0;
  endtask

  bit quiet = 0;
  initial begin
    cfg_valid = '0; cfg_idx = '0; cfg_enable = 0; cfg_producer = 0; cfg_consumer = 0;
    cfg_lat = 0; cfg_thr = 0; cfg_res = 0; cs_path_ok = '1;
    pe_tx_valid = '0; pe_tx_flit = '0; pe_rx_ready = '1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    configure(0, 0, PROD, CONS, 3, 0, 1000000);   // every packet late
    configure(0, 1, 7, 8, 100000, 1, 200);        // starved pair

    // traffic phase
    fork
      begin : producer
        for (int k = 0; k < 60; k++) begin
          producer_packet();
          repeat (40) @(posedge clk);
        end
      end
      begin : background
        for (int k = 0; k < 400; k++) begin
          int s, d;
          s = $urandom_range(0, NPE - 1);
          d = $urandom_range(0, NPE - 1);
          if (s != PROD && s != d && txq[s].size() < 40)
            send_data(s, d, $urandom_range(0, 2) == 0, 0, SW_PS, $urandom_range(0, 10));
          // bursts of HIGH traffic through the middle of the mesh
          if (k % 25 == 0)
            for (int j = 0; j < 3; j++) send_data(12, 3, 1, 0, SW_PS, 12);
          repeat (6) @(posedge clk);
        end
      end
    join
    // quiet phase: let circuit and priority time out
    quiet = 1;
    for (int w = 0; w < 40 && prod_mode != 2'd0; w++) repeat (50) @(posedge clk);
    if (circuit_open) begin
      producer_packet();   // releases the circuit
    end
    repeat (400) @(posedge clk);

    // ---------------- final checks ----------------
    begin
      int left;
      left = 0;
      for (int s = 0; s < NPE; s++) for (int d = 0; d < NPE; d++) left += sent_pkts[s][d].size();
      check(left == 0, $sformatf("all data packets delivered (%0d missing)", left));
    end
    check(bad == 0, "no corrupted or misrouted packet");
    check(delivered > 100, $sformatf("traffic delivered (%0d packets)", delivered));
    check(flow_mode[0][0] == 2'd0, "pair 0 back to LOW after the time-outs");
    check(cs_reserved == '0, "no circuit left reserved");
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-22s : %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' occurred", mech_name[m]));
    end
    begin
      int drops;
      drops = 0;
      for (int t = 0; t < NPE; t++) drops += int'(mon_drop[t]);
      check(drops == 0, "no monitoring report dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
