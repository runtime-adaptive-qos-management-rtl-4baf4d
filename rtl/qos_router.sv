// qos_router: mesh router with two physical channels on each of its five
// ports (East, West, North, South, Local).
//
// Channel 0 carries HIGH-priority traffic and circuits, channel 1 carries
// LOW-priority traffic; a HIGH packet may leave on channel 1 when every
// channel-0 hop towards its target is taken, and from then on it stays on
// channel 1. Routing follows a Hamiltonian numbering of the mesh: on
// channel 1 it is the deterministic version (always the legal neighbour
// closest to the target), on channel 0 the partially adaptive version (any
// legal neighbour whose label lies between the current router and the
// target, the closest free one first). Because every hop strictly moves the
// label towards the target, neither channel can deadlock.
//
// Circuit switching (channel 0 only): a CS_OPEN packet is routed adaptively
// over channel-0 outputs that are neither busy nor reserved, and on its way
// reserves each input/output pair it uses. The reservation outlives the
// packet: later packets arriving on that channel-0 input follow it without
// being routed again, and no other packet may use the reserved output. The
// CS_RELEASE packet travels the same path and frees it behind its last flit.
//
// Each input channel has a FIFO (BUF_DEPTH flits). Flow control is
// credit based: credit_o is high while the input FIFO has room, and a flit
// moves on a link in every cycle where tx and the receiver's credit are both
// high. Like the Hermes switch control, a single round-robin arbiter routes
// at most one waiting header per cycle. Every waiting header is routed in
// parallel against the current output state and the arbiter chooses only
// among those that can go, so a header whose outputs are all taken never
// holds up the others and cannot be starved by them (the pointer moves past
// each served input). After routing, wormhole switching lets
// all connected inputs move one flit per cycle. Header to first flit out:
// two cycles (write into the FIFO, then route).
//
// The two channels, the priority meaning of each, the two Hamiltonian
// routing variants, simultaneous packet and circuit switching, input
// buffering, credit flow control and round-robin arbitration follow the
// description of the QoS NoC. Multicast is not implemented. Buffer depth,
// header format and circuit set-up through a reserving packet are this
// design's choices.
module qos_router
  import qos_pkg::*;
#(
  parameter int unsigned MESH_W    = 4,
  parameter int unsigned MESH_H    = 4,
  parameter int unsigned X_ADDR    = 0,
  parameter int unsigned Y_ADDR    = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // incoming links
  input  logic  [NPORT-1:0][NCH-1:0]  rx,
  input  flit_t [NPORT-1:0][NCH-1:0]  data_in,
  output logic  [NPORT-1:0][NCH-1:0]  credit_o,
  // outgoing links
  output logic  [NPORT-1:0][NCH-1:0]  tx,
  output flit_t [NPORT-1:0][NCH-1:0]  data_out,
  input  logic  [NPORT-1:0][NCH-1:0]  credit_i,
  // status, for observation
  output logic  [NPORT-1:0]           cs_reserved_o  // channel-0 output held by a circuit
);
  localparam int unsigned NIO = NPORT * NCH;
  localparam int unsigned IW  = $clog2(NIO);

  // ---------------- input buffers ----------------
  flit_t [NIO-1:0] head;
  logic  [NIO-1:0] empty, full, pop;

  for (genvar i = 0; i < NIO; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr     (rx[i/NCH][i%NCH]),
      .wr_data(data_in[i/NCH][i%NCH]),
      .rd     (pop[i]),
      .rd_data(head[i]),
      .empty  (empty[i]),
      .full   (full[i])
    );
    assign credit_o[i/NCH][i%NCH] = !full[i];
  end

  // ---------------- connection state ----------------
  logic [NIO-1:0]          conn;      // input is forwarding a packet
  logic [NIO-1:0][IW-1:0]  out_sel;   // output it is connected to
  logic [NIO-1:0][1:0]     phase;     // 0 header, 1 size, 2 payload
  logic [NIO-1:0][FLIT_W-1:0] remain; // payload flits still to go
  logic [NIO-1:0]          cs_in;     // channel-0 input holds a circuit
  logic [NIO-1:0][IW-1:0]  cs_out;    // output of that circuit
  logic [NIO-1:0]          busy;      // output allocated to a packet
  logic [NIO-1:0][IW-1:0]  owner;     // input owning the output
  logic [NIO-1:0]          cs_res;    // output reserved by a circuit
  logic [IW-1:0]           rr;        // round-robin pointer

  // ---------------- routing / arbitration ----------------
  // Every waiting header is routed in parallel against the current output
  // state; the round-robin arbiter then serves one header that can go.
  logic [NIO-1:0]          can_go;    // header at input i can be routed now
  logic [NIO-1:0][IW-1:0]  go_out;    // output it would take
  logic [NIO-1:0]          go_open;   // and it opens a circuit there

  for (genvar i = 0; i < NIO; i++) begin : g_rt
    header_t     hd;
    int unsigned tx_, ty_, bd, hd_d, nx_, ny_, dp;
    logic        nok, at_tgt;

    assign hd = header_t'(head[i]);

    always_comb begin
      can_go[i]  = 1'b0;
      go_out[i]  = '0;
      go_open[i] = 1'b0;
      tx_ = int'(hd.x);
      ty_ = int'(hd.y);
      at_tgt = (tx_ == X_ADDR) && (ty_ == Y_ADDR);
      dp  = ham_det_port(X_ADDR, Y_ADDR, tx_, ty_, MESH_W, MESH_H);
      bd  = '1;
      nx_ = 0;
      ny_ = 0;
      nok = 1'b0;
      hd_d = 0;
      if (!empty[i] && !conn[i]) begin
        if (cs_in[i]) begin
          // packet on an open circuit follows the reservation
          if (!busy[cs_out[i]]) begin
            can_go[i] = 1'b1;
            go_out[i] = cs_out[i];
          end
        end else if (i % NCH == 1) begin
          if (!busy[dp*NCH+1]) begin
            can_go[i] = 1'b1;
            go_out[i] = IW'(dp*NCH+1);
          end
        end else if (at_tgt) begin
          if (!busy[P_LOCAL*NCH] && !cs_res[P_LOCAL*NCH]) begin
            can_go[i]  = 1'b1;
            go_out[i]  = IW'(P_LOCAL*NCH);
            go_open[i] = (hd.sw == SW_CS_OPEN);
          end else if (hd.sw != SW_CS_OPEN && !busy[P_LOCAL*NCH+1]) begin
            can_go[i] = 1'b1;
            go_out[i] = IW'(P_LOCAL*NCH+1);
          end
        end else begin
          // partially adaptive: closest free legal neighbour on channel 0
          for (int unsigned p = 0; p < 4; p++) begin
            if (ham_candidate(X_ADDR, Y_ADDR, tx_, ty_, MESH_W, MESH_H, p) &&
                !busy[p*NCH] && !cs_res[p*NCH]) begin
              neighbour(X_ADDR, Y_ADDR, MESH_W, MESH_H, p, nx_, ny_, nok);
              hd_d = ham_label(nx_, ny_, MESH_W);
              hd_d = (hd_d > ham_label(tx_, ty_, MESH_W)) ? hd_d - ham_label(tx_, ty_, MESH_W)
                                                         : ham_label(tx_, ty_, MESH_W) - hd_d;
              if (!can_go[i] || hd_d < bd) begin
                can_go[i] = 1'b1;
                go_out[i] = IW'(p*NCH);
                bd = hd_d;
              end
            end
          end
          go_open[i] = can_go[i] && (hd.sw == SW_CS_OPEN);
          // a HIGH packet-switched flow may fall back to channel 1
          if (!can_go[i] && hd.sw != SW_CS_OPEN && !busy[dp*NCH+1]) begin
            can_go[i] = 1'b1;
            go_out[i] = IW'(dp*NCH+1);
          end
        end
      end
    end
  end

  logic          req_any;     // some header can be routed this cycle
  logic [IW-1:0] req_sel;     // the one served
  logic          grant;
  logic [IW-1:0] grant_out;
  logic          grant_open;  // the served header opens a circuit

  always_comb begin
    req_any = 1'b0;
    req_sel = '0;
    for (int unsigned k = 0; k < NIO; k++) begin
      int unsigned i;
      i = (int'(rr) + k) % NIO;
      if (!req_any && can_go[i]) begin
        req_any = 1'b1;
        req_sel = IW'(i);
      end
    end
    grant      = req_any;
    grant_out  = go_out[req_sel];
    grant_open = go_open[req_sel];
  end

  // decoded view of the served header
  header_t     h;
  int unsigned det, ch;
  logic        here;
  assign h    = header_t'(head[req_sel]);
  assign ch   = int'(req_sel) % NCH;
  assign here = (int'(h.x) == X_ADDR) && (int'(h.y) == Y_ADDR);
  assign det  = ham_det_port(X_ADDR, Y_ADDR, int'(h.x), int'(h.y), MESH_W, MESH_H);

  // ---------------- crossbar ----------------
  // packed [port][channel] arrays flattened to index port*NCH+channel
  logic  [NIO-1:0] credit_flat, tx_flat;
  flit_t [NIO-1:0] dout_flat;
  assign credit_flat = credit_i;
  assign tx          = tx_flat;
  assign data_out    = dout_flat;

  always_comb begin
    for (int unsigned i = 0; i < NIO; i++)
      pop[i] = conn[i] && !empty[i] && credit_flat[out_sel[i]];
    for (int unsigned o = 0; o < NIO; o++) begin
      tx_flat[o]   = busy[o] && conn[owner[o]] && !empty[owner[o]];
      dout_flat[o] = head[owner[o]];
    end
    for (int unsigned p = 0; p < NPORT; p++)
      cs_reserved_o[p] = cs_res[p*NCH];
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conn    <= '0;
      out_sel <= '0;
      phase   <= '0;
      remain  <= '0;
      cs_in   <= '0;
      cs_out  <= '0;
      busy    <= '0;
      owner   <= '0;
      cs_res  <= '0;
      rr      <= '0;
    end else begin
      for (int unsigned i = 0; i < NIO; i++) begin
        if (pop[i]) begin
          logic is_last;
          header_t hh;
          is_last = 1'b0;
          case (phase[i])
            2'd0: phase[i] <= 2'd1;
            2'd1: begin
              phase[i]  <= 2'd2;
              remain[i] <= head[i];
              is_last = (head[i] == '0);
            end
            default: begin
              remain[i] <= remain[i] - 1'b1;
              is_last = (remain[i] == 1);
            end
          endcase
          if (is_last) begin
            phase[i]         <= 2'd0;
            conn[i]          <= 1'b0;
            busy[out_sel[i]] <= 1'b0;
          end
          hh = header_t'(head[i]);
          // a release packet frees the circuit once its header has passed
          if (phase[i] == 2'd0 && cs_in[i] && hh.sw == SW_CS_REL) begin
            cs_in[i]            <= 1'b0;
            cs_res[out_sel[i]]  <= 1'b0;
          end
        end
      end
      if (grant) rr <= (req_sel == IW'(NIO - 1)) ? '0 : req_sel + 1'b1;
      if (grant) begin
        conn[req_sel]    <= 1'b1;
        out_sel[req_sel] <= grant_out;
        busy[grant_out]  <= 1'b1;
        owner[grant_out] <= req_sel;
        if (grant_open) begin
          cs_in[req_sel]   <= 1'b1;
          cs_out[req_sel]  <= grant_out;
          cs_res[grant_out] <= 1'b1;
        end
      end
    end
  end

  // A circuit-reserved output only ever serves its own input
  for (genvar o = 0; o < NIO; o++) begin : g_chk
    a_cs_owner: assert property (@(posedge clk) disable iff (!rst_n)
      (cs_res[o] && busy[o]) |-> (cs_in[owner[o]] && cs_out[owner[o]] == IW'(o)));
  end
endmodule
