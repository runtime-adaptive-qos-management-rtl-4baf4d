// tb_qos_flow_manager: self-checking test of the flow adaptation heuristic
// with short timers (window 10 cycles, FCt 30, CSt 60).
// Checks the escalation LOW -> HIGH -> CS on latency events, that HIGH is
// kept when no circuit path is free, the adaptation orders and their
// content, the CS -> HIGH -> LOW returns after the timers (with the number of
// windows each takes), that a new event restarts the timer, that throughput
// events only request a computation adaptation, and that pairs are independent.
module tb_qos_flow_manager;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 10, F = 30, C = 60;
  logic       ev_valid, ev_thr, cs_ok;
  logic [1:0] ev_ctp;
  logic       ord_valid, comp_valid;
  logic [1:0] ord_ctp, ord_mode, comp_ctp;
  logic [3:0][1:0] mode;

  qos_flow_manager #(.NCTP(4), .WINDOW(W), .FCT(F), .CST(C)) dut (
    .clk, .rst_n, .ev_valid, .ev_throughput(ev_thr), .ev_ctp, .cs_path_ok(cs_ok),
    .ord_valid, .ord_ctp, .ord_mode, .comp_req_valid(comp_valid), .comp_req_ctp(comp_ctp),
    .mode_o(mode)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cycle); end
  endtask

  typedef struct { int cyc; int ctp; int mode; } ord_t;
  ord_t ords [$];
  int   comps = 0;
  always @(posedge clk) if (rst_n) begin
    if (ord_valid) ords.push_back('{cycle, int'(ord_ctp), int'(ord_mode)});
    if (comp_valid) comps++;
  end

  task automatic event_(input int ctp, input bit thr, input bit ok);
    ev_valid = 1; ev_ctp = 2'(ctp); ev_thr = thr; cs_ok = ok;
    @(posedge clk); #1;
    ev_valid = 0; cs_ok = 0;
  endtask

  int t_ev, t_chg;
  initial begin
    ev_valid = 0; ev_thr = 0; ev_ctp = 0; cs_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(mode == '0, "all pairs start LOW");

    event_(0, 0, 1);
    @(posedge clk); #1;
    check(mode[0] == 2'd1, "first latency event -> HIGH");
    check(ords.size() == 1 && ords[0].ctp == 0 && ords[0].mode == 1, "order HIGH issued");
    event_(0, 0, 0);
    @(posedge clk); #1;
    check(mode[0] == 2'd1 && ords.size() == 1, "no free path: HIGH kept, no order");
    event_(0, 0, 1);
    t_ev = cycle;
    @(posedge clk); #1;
    check(mode[0] == 2'd2 && ords.size() == 2 && ords[1].mode == 2, "second event with path -> CS");

    // throughput event on another pair: computation request only
    event_(3, 1, 1);
    @(posedge clk); #1;
    check(comps == 1 && mode[3] == 2'd0, "throughput event passed on, flow unchanged");

    // CS times out to HIGH after CSt
    while (mode[0] == 2'd2 && cycle < t_ev + 200) begin @(posedge clk); #1; end
    t_chg = cycle - t_ev;
    check(mode[0] == 2'd1, "CS released to HIGH");
    check(t_chg >= (C / W + 1) * W && t_chg <= (C / W + 2) * W + 2,
          $sformatf("CS kept for CSt (%0d cycles)", t_chg));
    repeat (2) @(posedge clk); #1;
    check(ords.size() == 3 && ords[2].mode == 1, "order HIGH after release");

    // an event while HIGH restarts the timer; then HIGH times out to LOW
    repeat (25) @(posedge clk); #1;
    event_(0, 0, 0);
    t_ev = cycle;
    while (mode[0] == 2'd1 && cycle < t_ev + 200) begin @(posedge clk); #1; end
    t_chg = cycle - t_ev;
    check(mode[0] == 2'd0, "HIGH returns to LOW");
    check(t_chg >= (F / W + 1) * W && t_chg <= (F / W + 2) * W + 2,
          $sformatf("HIGH kept for FCt after the last event (%0d cycles)", t_chg));
    repeat (2) @(posedge clk); #1;
    check(ords.size() == 4 && ords[3].mode == 0, "order LOW issued");

    // two more pairs raised one after the other give two orders
    event_(1, 0, 0);
    event_(2, 0, 0);
    repeat (3) @(posedge clk); #1;
    check(mode[1] == 2'd1 && mode[2] == 2'd1 && ords.size() == 6, "independent pairs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
