// tb_qos_ni: self-checking test of the network interface.
// The testbench plays both the processor and the router's local port.
// Checks: channel choice by priority and circuit commands, HIGH packets
// moved to channel 1 while the PE holds a circuit, cs_out_open/cs_in_open,
// merging of packets arriving on both channels without interleaving, the
// monitoring report sent after a monitored delivery (to the master, on
// channel 1, with the right latency), and that send_av stays low while the
// report owns the outgoing port, after which the PE's packet goes out whole.
module tb_qos_ni;
  import qos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] cur_time;
  logic        pe_tx_valid, pe_send_av, pe_rx_valid, pe_rx_ready;
  flit_t       pe_tx_flit, pe_rx_flit;
  logic  [NCH-1:0] r_tx, r_credit, l_tx, l_credit;
  flit_t [NCH-1:0] r_data, l_data;
  logic        cs_out_open, cs_in_open;
  logic [15:0] drop_cnt, sent_cnt;
  localparam logic [7:0] MASTER = 8'h00;

  qos_ni dut (
    .clk, .rst_n, .cur_time, .master_addr(MASTER),
    .pe_tx_valid, .pe_tx_flit, .pe_send_av,
    .pe_rx_valid, .pe_rx_flit, .pe_rx_ready,
    .r_tx, .r_data, .r_credit, .l_tx, .l_data, .l_credit,
    .cs_out_open, .cs_in_open, .mon_drop_cnt(drop_cnt), .mon_sent_cnt(sent_cnt)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at t=%0d", what, cur_time); end
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) cur_time <= '0;
    else        cur_time <= cur_time + 1;
  end

  flit_t netq [NCH][$];   // flits the NI sent into the router
  flit_t peq [$];         // flits the NI handed to the PE
  int    blocked = 0;     // cycles the PE waited while a report held the port
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) if (r_tx[c] && r_credit[c]) netq[c].push_back(r_data[c]);
    if (pe_rx_valid && pe_rx_ready) peq.push_back(pe_rx_flit);
    if (pe_tx_valid && !pe_send_av && dut.o_busy && dut.o_src_mon) blocked++;
  end

  function automatic flit_t mk(bit prio, bit mon, sw_e sw, service_e srv, int x, int y);
    header_t h;
    h = '0; h.prio = prio; h.mon = mon; h.sw = sw; h.srv = srv; h.x = 4'(x); h.y = 4'(y);
    return flit_t'(h);
  endfunction

  task automatic pe_send(input flit_t f [$]);
    foreach (f[i]) begin
      pe_tx_valid = 1; pe_tx_flit = f[i];
      #1;
      while (!pe_send_av) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    pe_tx_valid = 0;
  endtask

  task automatic net_send(input int c, input flit_t f [$]);
    foreach (f[i]) begin
      l_tx[c] = 1; l_data[c] = f[i];
      #1;
      while (!l_credit[c]) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    l_tx[c] = 0;
  endtask

  function automatic bit same(flit_t a [$], flit_t b [$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction


  flit_t p_low [$], p_high [$], p_open [$], p_data [$], p_rel [$], p_a [$], p_b [$], p_mon [$];
  flit_t rep [$];
  header_t rh;
  logic [31:0] t0;
  initial begin
    pe_tx_valid = 0; pe_tx_flit = '0; pe_rx_ready = 1;
    l_tx = '0; l_data = '0; r_credit = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // channel selection
    p_low  = {mk(0, 0, SW_PS, SRV_MSG_DELIV, 2, 3), 16'd3, 16'hA1, 16'hA2, 16'hA3};
    p_high = {mk(1, 0, SW_PS, SRV_MSG_DELIV, 2, 3), 16'd2, 16'hB1, 16'hB2};
    pe_send(p_low);
    pe_send(p_high);
    repeat (2) @(posedge clk); #1;
    check(same(netq[1], p_low), "LOW packet on channel 1");
    check(same(netq[0], p_high), "HIGH packet on channel 0");
    netq[0].delete(); netq[1].delete();

    // circuit: open, HIGH packet diverted to channel 1, circuit data, release
    p_open = {mk(1, 0, SW_CS_OPEN, SRV_OTHER, 2, 3), 16'd0};
    p_data = {mk(1, 0, SW_CS_DATA, SRV_MSG_DELIV, 2, 3), 16'd1, 16'hC1};
    p_rel  = {mk(1, 0, SW_CS_REL, SRV_OTHER, 2, 3), 16'd0};
    pe_send(p_open);
    #1 check(cs_out_open, "circuit marked open");
    pe_send(p_high);
    pe_send(p_data);
    pe_send(p_rel);
    #1 check(!cs_out_open, "circuit marked released");
    pe_send(p_high);
    repeat (2) @(posedge clk); #1;
    check(same(netq[1], p_high), "HIGH packet on channel 1 while circuit open");
    begin
      flit_t e [$];
      e = {p_open, p_data, p_rel, p_high};
      check(same(netq[0], e), "circuit packets on channel 0, HIGH back on 0 after release");
    end
    netq[0].delete(); netq[1].delete();

    // receive: two packets arrive together on both channels
    p_a = {mk(1, 0, SW_CS_OPEN, SRV_OTHER, 0, 0), 16'd4, 16'h1, 16'h2, 16'h3, 16'h4};
    p_b = {mk(0, 0, SW_PS, SRV_MSG_REQ, 0, 0), 16'd3, 16'h11, 16'h12, 16'h13};
    fork
      net_send(0, p_a);
      net_send(1, p_b);
    join
    repeat (2) @(posedge clk); #1;
    begin
      flit_t e1 [$], e2 [$];
      e1 = {p_a, p_b}; e2 = {p_b, p_a};
      check(same(peq, e1) || same(peq, e2), "both packets delivered whole");
    end
    check(cs_in_open, "incoming circuit flagged");
    check(sent_cnt == 0, "no report for unmonitored packets");
    peq.delete();

    // monitored delivery: the report must leave before the PE's next packet
    t0 = cur_time;
    p_mon = {mk(1, 1, SW_PS, SRV_MSG_DELIV, 0, 0), 16'd7, 16'(((t0 - 50) >> 16)), 16'(t0 - 50),
             16'h0, 16'd4, 16'h0, 16'd9, 16'hEE};
    net_send(0, p_mon);
    pe_send(p_low);   // offered while the report is waiting or leaving
    repeat (3) @(posedge clk); #1;
    check(same(peq, p_mon), "monitored packet delivered to the PE");
    check(netq[1].size() == 10 + 5, "report and PE packet on channel 1");
    for (int i = 0; i < 10; i++) rep.push_back(netq[1][i]);
    rh = header_t'(rep[0]);
    check(rh.srv == SRV_MON_REPORT && {rh.x, rh.y} == MASTER && rep[1] == 16'd8, "report header and size");
    check({rep[4], rep[5]} == 32'd50, $sformatf("report latency %0d", {rep[4], rep[5]}));
    check({rep[2], rep[3]} == 32'd7 && {rep[6], rep[7]} == 32'd4 && {rep[8], rep[9]} == 32'd9,
          "report size and task ids");
    begin
      flit_t tail [$];
      for (int i = 10; i < netq[1].size(); i++) tail.push_back(netq[1][i]);
      check(same(tail, p_low), "PE packet follows the report intact");
    end
    check(blocked > 0, $sformatf("send_av held low while the report was sent (%0d cycles)", blocked));
    check(sent_cnt == 1, "one report counted");

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
