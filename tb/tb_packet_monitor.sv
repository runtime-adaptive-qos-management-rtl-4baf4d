// tb_packet_monitor: self-checking test of the packet monitor.
// Feeds monitored and unmonitored MESSAGE_DELIVERY packets as the NI would
// hand them to the processor, and checks every flit of the monitoring
// packets (target, size 8, payload size, latency = header arrival time -
// timestamp, producer, consumer), that the report is offered one cycle after
// the last id flit, that unmonitored packets and other services produce
// nothing, and that a full report queue drops and counts reports.
module tb_packet_monitor;
  import qos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] cur_time;
  logic        snoop_valid, mon_valid, mon_ready;
  flit_t       snoop_flit, mon_flit;
  logic [15:0] drop_cnt;
  localparam logic [7:0] MASTER = 8'h21;

  packet_monitor #(.REPORT_DEPTH(2)) dut (
    .clk, .rst_n, .cur_time, .master_addr(MASTER),
    .snoop_valid, .snoop_flit, .mon_valid, .mon_flit, .mon_ready, .drop_cnt
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at t=%0d", what, cur_time); end
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) cur_time <= 32'h0001_FFF0;  // crosses a 16-bit boundary during the test
    else        cur_time <= cur_time + 1;
  end

  flit_t got [$];
  always @(posedge clk) if (rst_n && mon_valid && mon_ready) got.push_back(mon_flit);

  function automatic flit_t hdr(bit mon, service_e srv);
    header_t h;
    h = '0; h.mon = mon; h.srv = srv; h.x = 4'd3; h.y = 4'd0;
    return flit_t'(h);
  endfunction

  // one packet into the snoop port, one flit per cycle; returns header time
  task automatic feed(input flit_t h, input int n_app, input logic [31:0] ts,
                      input logic [31:0] prod, input logic [31:0] cons,
                      output logic [31:0] t_hdr, output int last_cycle_time);
    flit_t f [$];
    f = {h, 16'(6 + n_app), ts[31:16], ts[15:0], prod[31:16], prod[15:0],
         cons[31:16], cons[15:0]};
    for (int i = 0; i < n_app; i++) f.push_back(16'(i));
    foreach (f[i]) begin
      snoop_valid = 1; snoop_flit = f[i];
      if (i == 0) t_hdr = cur_time;
      if (i == 7) last_cycle_time = int'(cur_time);
      @(posedge clk); #1;
    end
    snoop_valid = 0;
  endtask

  task automatic expect_report(input logic [31:0] size, input logic [31:0] lat,
                               input logic [31:0] prod, input logic [31:0] cons,
                               input string what);
    flit_t e [$];
    header_t h;
    bit ok;
    h = '0; h.srv = SRV_MON_REPORT; h.x = MASTER[7:4]; h.y = MASTER[3:0];
    e = {flit_t'(h), 16'd8, size[31:16], size[15:0], lat[31:16], lat[15:0],
         prod[31:16], prod[15:0], cons[31:16], cons[15:0]};
    ok = got.size() >= 10;
    for (int i = 0; ok && i < 10; i++) ok = (got[i] == e[i]);
    check(ok, $sformatf("%s (got %0d flits)", what, got.size()));
    repeat (10) if (got.size() > 0) void'(got.pop_front());
  endtask

  logic [31:0] th;
  int tl, tl1;
  int tv = -1;  // time the first report was first offered
  always @(posedge clk) if (rst_n && mon_valid && tv < 0) tv = int'(cur_time);
  initial begin
    snoop_valid = 0; snoop_flit = '0; mon_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // monitored packet, 4 application flits, timestamp 37 cycles before arrival
    feed(hdr(1, SRV_MSG_DELIV), 4, cur_time - 37, 32'h0001_0005, 32'h0002_0007, th, tl);
    tl1 = tl;
    repeat (12) @(posedge clk); #1;
    expect_report(32'd10, 32'd37, 32'h0001_0005, 32'h0002_0007, "first report");

    // unmonitored delivery and a monitored packet of another service: no report
    feed(hdr(0, SRV_MSG_DELIV), 2, 0, 1, 2, th, tl);
    feed(hdr(1, SRV_MSG_REQ), 2, 0, 1, 2, th, tl);
    repeat (15) @(posedge clk); #1;
    check(got.size() == 0 && !mon_valid, "no report for unmonitored packets");

    // back-to-back monitored packets, large latency crossing 16 bits
    feed(hdr(1, SRV_MSG_DELIV), 0, cur_time - 70000, 32'h11, 32'h22, th, tl);
    feed(hdr(1, SRV_MSG_DELIV), 9, cur_time - 5, 32'h33, 32'h44, th, tl);
    repeat (25) @(posedge clk); #1;
    expect_report(32'd6, 32'd70000, 32'h11, 32'h22, "back-to-back report 1");
    expect_report(32'd15, 32'd5, 32'h33, 32'h44, "back-to-back report 2");

    // queue full: with the output blocked, the third report is dropped
    mon_ready = 0;
    for (int k = 0; k < 3; k++) feed(hdr(1, SRV_MSG_DELIV), 1, cur_time - 9, k, 8, th, tl);
    repeat (3) @(posedge clk); #1;
    check(drop_cnt == 16'd1, "third report dropped and counted");
    mon_ready = 1;
    repeat (25) @(posedge clk); #1;
    expect_report(32'd7, 32'd9, 32'd0, 32'd8, "queued report 1");
    expect_report(32'd7, 32'd9, 32'd1, 32'd8, "queued report 2");
    check(got.size() == 0, "nothing more");
    // timing of the first report
    check(tv == tl1 + 1, $sformatf("report offered one cycle after last id flit (%0d vs %0d)", tv, tl1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
