// qos_pkg: types, constants and routing functions shared by the QoS NoC,
// the network interface and the monitoring blocks.
//
// Links carry 16-bit flits on two physical channels per port: channel 0 is
// the high-priority channel (packet and circuit switching), channel 1 the
// low-priority one. A packet is a header flit, a size flit (number of flits
// that follow) and a payload. The header layout, the service codes and the
// port numbering are this design's own choice:
//   [15]    priority (1 = HIGH)
//   [14]    monitor bit: the packet is watched by the receiver's packet monitor
//   [13:12] switching command: PS, CS_OPEN, CS_RELEASE, CS_DATA
//   [11:8]  service code
//   [7:4]   target X, [3:0] target Y
// Routers are numbered along a Hamiltonian (snake) path: row y is walked left
// to right when y is even and right to left when y is odd.
package qos_pkg;

  localparam int FLIT_W = 16;
  localparam int NPORT  = 5;
  localparam int NCH    = 2;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    SW_PS      = 2'b00,  // ordinary packet switching
    SW_CS_OPEN = 2'b01,  // reserves channel 0 along its path
    SW_CS_REL  = 2'b10,  // travels the reserved path and frees it
    SW_CS_DATA = 2'b11   // data packet carried over an open circuit
  } sw_e;

  typedef enum logic [3:0] {
    SRV_OTHER     = 4'h0,
    SRV_MSG_REQ   = 4'h1,  // MESSAGE_REQUEST
    SRV_MSG_DELIV = 4'h2,  // MESSAGE_DELIVERY (data packet)
    SRV_MON_REPORT= 4'h3   // packet monitor -> cluster master
  } service_e;

  typedef struct packed {
    logic     prio;
    logic     mon;
    sw_e      sw;
    service_e srv;
    logic [3:0] x;
    logic [3:0] y;
  } header_t;

  // Words of the monitoring packet payload (two flits each, high half first)
  localparam int MON_PAYLOAD_FLITS = 8;

  // Hamiltonian label of router (x, y) in a mesh that is w routers wide
  function automatic int unsigned ham_label(int unsigned x, int unsigned y, int unsigned w);
    return (y % 2 == 0) ? y * w + x : y * w + (w - 1 - x);
  endfunction

  // Neighbour of (x, y) through port p; ok = 0 when it is off the mesh
  function automatic void neighbour(input int unsigned x, input int unsigned y,
                                    input int unsigned w, input int unsigned h,
                                    input int unsigned p,
                                    output int unsigned nx, output int unsigned ny,
                                    output logic ok);
    nx = x; ny = y; ok = 1'b0;
    case (p)
      0: if (x + 1 < w) begin nx = x + 1; ok = 1'b1; end
      1: if (x > 0)     begin nx = x - 1; ok = 1'b1; end
      2: if (y + 1 < h) begin ny = y + 1; ok = 1'b1; end
      3: if (y > 0)     begin ny = y - 1; ok = 1'b1; end
      default: ok = 1'b0;
    endcase
  endfunction

  // True when going through port p from (x, y) moves strictly towards the
  // target label without passing it (the set of legal Hamiltonian hops)
  function automatic logic ham_candidate(int unsigned x, int unsigned y,
                                         int unsigned tx, int unsigned ty,
                                         int unsigned w, int unsigned h,
                                         int unsigned p);
    int unsigned nx, ny, c, t, n;
    logic ok;
    neighbour(x, y, w, h, p, nx, ny, ok);
    if (!ok) return 1'b0;
    c = ham_label(x, y, w);
    t = ham_label(tx, ty, w);
    n = ham_label(nx, ny, w);
    if (t > c) return (n > c) && (n <= t);
    if (t < c) return (n < c) && (n >= t);
    return 1'b0;
  endfunction

  // Deterministic Hamiltonian hop: the legal neighbour whose label is
  // closest to the target. Returns P_LOCAL when (x, y) is the target.
  function automatic int unsigned ham_det_port(int unsigned x, int unsigned y,
                                               int unsigned tx, int unsigned ty,
                                               int unsigned w, int unsigned h);
    int unsigned best, best_lab, nx, ny, lab, t;
    logic ok;
    t = ham_label(tx, ty, w);
    if (t == ham_label(x, y, w)) return 4;
    best = 4;
    best_lab = 0;
    for (int unsigned p = 0; p < 4; p++) begin
      if (ham_candidate(x, y, tx, ty, w, h, p)) begin
        neighbour(x, y, w, h, p, nx, ny, ok);
        lab = ham_label(nx, ny, w);
        if (best == 4 ||
            (t > lab ? t - lab : lab - t) < (t > best_lab ? t - best_lab : best_lab - t)) begin
          best = p;
          best_lab = lab;
        end
      end
    end
    return best;
  endfunction

endpackage
