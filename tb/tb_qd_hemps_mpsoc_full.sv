// tb_qd_hemps_mpsoc_full: one complete monitoring and adaptation round on
// the fabric at its default size and timers (4x4 mesh, four 2x2 clusters,
// 1 ms window, FCt 15 ms, CSt 30 ms at 100 MHz).
// Tile 15 sends three monitored packets to tile 0 with a latency deadline
// they all miss; the packet monitor of tile 0 reports each one to the
// cluster-0 master (tile 1), whose latency monitor raises one event after the third
// violation; the flow manager orders HIGH priority for the pair. The
// producer then sends a HIGH packet, which must arrive intact. Checks the
// delivered packets, the three reports, the single event and the order.
module tb_qd_hemps_mpsoc_full;
  import qos_pkg::*;

  localparam int NPE = 16, NCL = 4;

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

  qd_hemps_mpsoc dut (
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

  flit_t txq [$];      // tile 15's outgoing flits
  flit_t rxq1 [$];     // flits delivered to tile 0, the consumer
  flit_t rxq0 [$];     // flits delivered to tile 1, the cluster-0 master
  int    events = 0, orders = 0;
  logic [1:0] last_order = 2'd3;

  always @(negedge clk) begin
    pe_tx_valid     = '0;
    pe_tx_flit      = '0;
    pe_tx_valid[15] = txq.size() > 0;
    if (txq.size() > 0) pe_tx_flit[15] = txq[0];
  end
  always @(posedge clk) if (rst_n) begin
    if (pe_tx_valid[15] && pe_send_av[15]) void'(txq.pop_front());
    if (pe_rx_valid[0]) rxq1.push_back(pe_rx_flit[0]);
    if (pe_rx_valid[1]) rxq0.push_back(pe_rx_flit[1]);
    if (ev_valid[0]) events++;
    if (ord_valid[0]) begin orders++; last_order = ord_mode[0]; end
  end

  function automatic flit_t hdr(bit prio);
    header_t h;
    h = '0; h.prio = prio; h.mon = 1'b1; h.sw = SW_PS; h.srv = SRV_MSG_DELIV;
    h.x = 4'd0; h.y = 4'd0;
    return flit_t'(h);
  endfunction

  function automatic void packet(input bit prio, input int k, ref flit_t q [$], ref flit_t e [$]);
    flit_t f [$];
    f = {hdr(prio), 16'd10, cur_time[31:16], cur_time[15:0], 16'd0, 16'd15, 16'd0, 16'd0,
         16'(k), 16'(k + 1), 16'(k + 2), 16'(k + 3)};
    foreach (f[i]) begin q.push_back(f[i]); e.push_back(f[i]); end
  endfunction

  flit_t expect1 [$];
  initial begin
    cfg_valid = '0; cfg_idx = '0; cfg_enable = 0; cfg_producer = 0; cfg_consumer = 0;
    cfg_lat = 0; cfg_thr = 0; cfg_res = 0; cs_path_ok = '1; pe_rx_ready = '1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_valid[0] = 1; cfg_enable = 1; cfg_producer = 15; cfg_consumer = 0;
    cfg_lat = 3; cfg_thr = 0; cfg_res = 0;
    @(negedge clk);
    cfg_valid = '0;

    for (int k = 0; k < 3; k++) begin
      packet(1'b0, 16 * k, txq, expect1);
      repeat (60) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    check(rxq1.size() == expect1.size(), "three LOW packets delivered");
    check(rxq1 == expect1, "LOW packets intact");
    check(rxq0.size() == 30, $sformatf("three reports reached the master (%0d flits)", rxq0.size()));
    check(events == 1, "one latency event after three violations");
    check(orders == 1 && last_order == 2'd1 && flow_mode[0][0] == 2'd1, "pair ordered to HIGH");

    // the producer applies the order
    packet(1'b1, 100, txq, expect1);
    repeat (80) @(posedge clk);
    check(rxq1 == expect1, "HIGH packet delivered intact");
    check(mon_sent[0] == 4 && mon_drop[0] == 0, "four reports sent by tile 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
