// tb_tl_monitor: self-checking test of the throughput and latency monitors.
// Pair 0 has a latency deadline: two late reports give no event, the third
// gives one latency event two cycles after its last flit, an on-time report
// counts nothing, and reports of unknown pairs or other services are ignored.
// Pair 1 receives nothing: its third empty window gives a throughput event.
// Pair 2 receives enough bits per window and never gives an event.
module tb_tl_monitor;
  import qos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_valid, cfg_enable;
  logic [1:0]  cfg_idx;
  logic [31:0] cfg_producer, cfg_consumer, cfg_lat, cfg_thr, cfg_res;
  logic        rep_valid;
  flit_t       rep_flit;
  logic        ev_valid, ev_thr;
  logic [1:0]  ev_ctp;
  logic [15:0] seen;

  tl_monitor #(.NCTP(4), .VIOL_THRESHOLD(3), .DEFAULT_RESOLUTION(500000)) dut (
    .clk, .rst_n,
    .cfg_valid, .cfg_idx, .cfg_enable, .cfg_producer, .cfg_consumer,
    .cfg_lat_deadline(cfg_lat), .cfg_thr_deadline(cfg_thr), .cfg_resolution(cfg_res),
    .rep_valid, .rep_flit, .ev_valid, .ev_throughput(ev_thr), .ev_ctp, .reports_seen(seen)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cycle); end
  endtask

  // event log
  int ev_cnt [2][4];
  int last_ev_cycle = -1;
  always @(posedge clk) if (rst_n && ev_valid) begin
    ev_cnt[ev_thr][ev_ctp]++;
    last_ev_cycle = cycle;
  end

  task automatic configure(input int idx, input int prod, input int cons,
                           input int lat, input int thr, input int res);
    cfg_valid = 1; cfg_idx = 2'(idx); cfg_enable = 1;
    cfg_producer = prod; cfg_consumer = cons; cfg_lat = lat; cfg_thr = thr; cfg_res = res;
    @(posedge clk); #1;
    cfg_valid = 0;
  endtask

  int last_flit_cycle;
  task automatic report(input service_e srv, input int size, input int lat,
                        input int prod, input int cons);
    header_t h;
    flit_t f [$];
    h = '0; h.srv = srv;
    f = {flit_t'(h), 16'd8, 16'(size >> 16), 16'(size), 16'(lat >> 16), 16'(lat),
         16'(prod >> 16), 16'(prod), 16'(cons >> 16), 16'(cons)};
    foreach (f[i]) begin
      rep_valid = 1; rep_flit = f[i];
      last_flit_cycle = cycle;
      @(posedge clk); #1;
    end
    rep_valid = 0;
  endtask

  initial begin
    cfg_valid = 0; cfg_idx = 0; cfg_enable = 0; cfg_producer = 0; cfg_consumer = 0;
    cfg_lat = 0; cfg_thr = 0; cfg_res = 0; rep_valid = 0; rep_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    configure(0, 5, 9, 40, 0, 1000000);     // latency only
    report(SRV_MON_REPORT, 7, 50, 5, 9);
    report(SRV_MON_REPORT, 7, 30, 5, 9);     // on time
    report(SRV_MON_REPORT, 7, 41, 5, 9);
    report(SRV_MON_REPORT, 7, 90, 6, 9);     // unknown pair
    report(SRV_OTHER, 7, 90, 5, 9);          // not a report
    repeat (4) @(posedge clk); #1;
    check(ev_cnt[0][0] == 0, "no event after two violations");
    report(SRV_MON_REPORT, 7, 41, 5, 9);
    repeat (4) @(posedge clk); #1;
    check(ev_cnt[0][0] == 1, "latency event after the third violation");
    check(last_ev_cycle == last_flit_cycle + 2, $sformatf("event two cycles after last flit (%0d/%0d)",
                                                        last_ev_cycle, last_flit_cycle));
    check(seen == 5, "reports counted");

    // throughput
    configure(1, 1, 2, 1000, 160, 100);
    configure(2, 3, 4, 1000, 160, 100);
    for (int w = 0; w < 4; w++) begin
      report(SRV_MON_REPORT, 10, 5, 3, 4);
      report(SRV_MON_REPORT, 10, 5, 3, 4);
      repeat (80) @(posedge clk); #1;
    end
    check(ev_cnt[1][1] == 1, $sformatf("throughput event for the starved pair (%0d)", ev_cnt[1][1]));
    check(ev_cnt[1][2] == 0, "no throughput event for the served pair");
    check(ev_cnt[0][0] == 1 && ev_cnt[1][0] == 0, "pair 0 unaffected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
