// tb_qos_router: self-checking test of one router placed at (1,1) of a 4x4
// mesh (Hamiltonian label 6; neighbours E=5, W=7, N=9, S=1).
// Checks: deterministic routing on channel 1 up and down the Hamiltonian
// path and to the local port, the two-cycle header latency, partially
// adaptive routing on channel 0 when the preferred output is busy, the
// fall-back of HIGH packets to channel 1, circuit opening, data over the
// circuit, exclusion of other packets from a reserved output, release, and
// that every packet leaves unchanged.
module tb_qos_router;
  import qos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NPORT-1:0][NCH-1:0] rx, credit_o, tx, credit_i;
  flit_t [NPORT-1:0][NCH-1:0] data_in, data_out;
  logic  [NPORT-1:0]          cs_res;

  qos_router #(.MESH_W(4), .MESH_H(4), .X_ADDR(1), .Y_ADDR(1), .BUF_DEPTH(8)) dut (
    .clk, .rst_n, .rx, .data_in, .credit_o, .tx, .data_out, .credit_i,
    .cs_reserved_o(cs_res)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // collected output flits and the cycle of each output's first flit
  flit_t outq [NPORT][NCH][$];
  int    first_cycle [NPORT][NCH];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORT; p++)
      for (int c = 0; c < NCH; c++)
        if (tx[p][c] && credit_i[p][c]) begin
          if (outq[p][c].size() == 0) first_cycle[p][c] = cycle;
          outq[p][c].push_back(data_out[p][c]);
        end
  end

  function automatic flit_t mk_hdr(bit prio, sw_e sw, int x, int y);
    header_t h;
    h = '0;
    h.prio = prio; h.sw = sw; h.srv = SRV_MSG_DELIV;
    h.x = 4'(x); h.y = 4'(y);
    return flit_t'(h);
  endfunction

  // drive one packet into input (p, c), respecting credit
  task automatic send(input int p, input int c, input flit_t hdr, input int n,
                      input int base, output int start_cycle);
    flit_t f [$];
    f.push_back(hdr);
    f.push_back(16'(n));
    for (int i = 0; i < n; i++) f.push_back(16'(base + i));
    start_cycle = -1;
    foreach (f[i]) begin
      rx[p][c] = 1'b1;
      data_in[p][c] = f[i];
      #1;
      while (!credit_o[p][c]) begin @(posedge clk); #1; end
      if (start_cycle < 0) start_cycle = cycle;
      @(posedge clk);
      #1;
    end
    rx[p][c] = 1'b0;
  endtask

  // compare what left output (p, c) with the packet that was sent
  task automatic expect_pkt(input int p, input int c, input flit_t hdr, input int n,
                            input int base, input string what);
    bit ok;
    ok = (outq[p][c].size() == n + 2);
    if (ok) ok = (outq[p][c][0] == hdr) && (outq[p][c][1] == 16'(n));
    for (int i = 0; ok && i < n; i++) ok = (outq[p][c][2+i] == 16'(base + i));
    check(ok, $sformatf("%s: packet on output %0d ch%0d (got %0d flits)", what, p, c,
                        outq[p][c].size()));
    outq[p][c].delete();
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  int sc;
  initial begin
    rx = '0; data_in = '0; credit_i = '1;
    idle(3);
    rst_n = 1;
    idle(2);

    // 1. LOW packet upwards: (1,1) -> (3,3), deterministic = North on channel 1
    send(P_LOCAL, 1, mk_hdr(0, SW_PS, 3, 3), 4, 100, sc);
    idle(6);
    check(first_cycle[P_NORTH][1] == sc + 2, "header latency is two cycles");
    expect_pkt(P_NORTH, 1, mk_hdr(0, SW_PS, 3, 3), 4, 100, "low up");

    // 2. LOW packet downwards: (1,1) -> (0,0), deterministic = South
    send(P_LOCAL, 1, mk_hdr(0, SW_PS, 0, 0), 3, 200, sc);
    idle(6);
    expect_pkt(P_SOUTH, 1, mk_hdr(0, SW_PS, 0, 0), 3, 200, "low down");

    // 3. packet for this router arriving from the West on channel 1
    send(P_WEST, 1, mk_hdr(0, SW_PS, 1, 1), 2, 300, sc);
    idle(6);
    expect_pkt(P_LOCAL, 1, mk_hdr(0, SW_PS, 1, 1), 2, 300, "ejection");

    // 4. HIGH packets: preferred North ch0; when busy West ch0; then ch1 fallback
    credit_i[P_NORTH][0] = 1'b0;
    credit_i[P_WEST][0]  = 1'b0;
    send(P_LOCAL, 0, mk_hdr(1, SW_PS, 3, 3), 3, 400, sc);
    idle(3);
    send(P_EAST, 0, mk_hdr(1, SW_PS, 3, 3), 3, 500, sc);
    idle(3);
    send(P_SOUTH, 0, mk_hdr(1, SW_PS, 3, 3), 3, 600, sc);
    idle(6);
    check(tx[P_NORTH][0] && tx[P_WEST][0], "both channel-0 candidates taken");
    expect_pkt(P_NORTH, 1, mk_hdr(1, SW_PS, 3, 3), 3, 600, "high fallback to channel 1");
    credit_i[P_NORTH][0] = 1'b1;
    credit_i[P_WEST][0]  = 1'b1;
    idle(8);
    expect_pkt(P_NORTH, 0, mk_hdr(1, SW_PS, 3, 3), 3, 400, "high preferred hop");
    expect_pkt(P_WEST, 0, mk_hdr(1, SW_PS, 3, 3), 3, 500, "high adaptive hop");

    // 5. circuit switching
    send(P_LOCAL, 0, mk_hdr(1, SW_CS_OPEN, 3, 3), 1, 700, sc);
    idle(6);
    check(cs_res[P_NORTH], "circuit reserves North channel 0");
    expect_pkt(P_NORTH, 0, mk_hdr(1, SW_CS_OPEN, 3, 3), 1, 700, "circuit open");
    // data over the circuit: header target deliberately elsewhere, must follow circuit
    send(P_LOCAL, 0, mk_hdr(1, SW_CS_DATA, 0, 0), 5, 800, sc);
    idle(8);
    expect_pkt(P_NORTH, 0, mk_hdr(1, SW_CS_DATA, 0, 0), 5, 800, "data follows circuit");
    // another HIGH flow upwards must avoid the reserved output
    send(P_EAST, 0, mk_hdr(1, SW_PS, 3, 3), 2, 900, sc);
    idle(6);
    expect_pkt(P_WEST, 0, mk_hdr(1, SW_PS, 3, 3), 2, 900, "reserved output avoided");
    check(outq[P_NORTH][0].size() == 0, "nothing else on the circuit");
    send(P_LOCAL, 0, mk_hdr(1, SW_CS_REL, 3, 3), 0, 0, sc);
    idle(6);
    expect_pkt(P_NORTH, 0, mk_hdr(1, SW_CS_REL, 3, 3), 0, 0, "circuit release");
    check(!cs_res[P_NORTH], "release frees North channel 0");
    // after release, HIGH traffic may use North channel 0 again
    send(P_EAST, 0, mk_hdr(1, SW_PS, 3, 3), 2, 950, sc);
    idle(6);
    expect_pkt(P_NORTH, 0, mk_hdr(1, SW_PS, 3, 3), 2, 950, "output free again");

    // 6. a stream of back-to-back packets keeps order and content
    for (int k = 0; k < 4; k++) send(P_NORTH, 1, mk_hdr(0, SW_PS, 0, 0), 6, 1000 + 16*k, sc);
    idle(10);
    begin
      bit ok;
      ok = (outq[P_SOUTH][1].size() == 32);
      for (int k = 0; ok && k < 4; k++)
        for (int i = 0; i < 6; i++)
          if (outq[P_SOUTH][1][k*8+2+i] != 16'(1000 + 16*k + i)) ok = 0;
      check(ok, "back-to-back stream intact");
      outq[P_SOUTH][1].delete();
    end

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
