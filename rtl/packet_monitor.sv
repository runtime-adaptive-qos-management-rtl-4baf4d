// packet_monitor: hardware half of the hybrid monitoring scheme, placed in
// the network interface of every PE.
//
// It watches the flits the NI hands to the processor. When a packet is a
// MESSAGE_DELIVERY whose header has the monitor bit set, it records the
// time the header arrived, then picks out of the following flits the
// payload size, the producer's timestamp, the producer task id and the
// consumer task id. The latency is the header arrival time minus the
// timestamp, i.e. the time the header spent in the network. The four
// values are queued and sent as a monitoring packet to the cluster master:
//   header (SRV_MON_REPORT, LOW priority, target master_addr)
//   size = 8
//   size[31:16], size[15:0], latency[31:16], latency[15:0],
//   producer[31:16], producer[15:0], consumer[31:16], consumer[15:0]
// The report leaves on mon_* with a valid/ready handshake; the NI decides
// when it may use the outgoing link. If the report queue is full when a new
// report is complete, that report is dropped and drop_cnt counts it.
//
// Monitored data packet layout (flit index within the packet):
//   0 header, 1 size (flits after it), 2-3 timestamp, 4-5 producer id,
//   6-7 consumer id, 8... application payload.
// The fields, their order and the 8-flit report payload follow the
// description of the packet monitor; 32-bit fields split into two 16-bit
// flits, the report queue and its depth are this design's choices.
// Timing: a report is queued one cycle after consumer[15:0] is seen and its
// header can leave in the following cycle.
module packet_monitor
  import qos_pkg::*;
#(
  parameter int unsigned REPORT_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] cur_time,
  input  logic [7:0]  master_addr,   // {x, y} of the cluster master
  // flits accepted by the processor side of the NI
  input  logic        snoop_valid,
  input  flit_t       snoop_flit,
  // monitoring packet towards the NI output mux
  output logic        mon_valid,
  output flit_t       mon_flit,
  input  logic        mon_ready,
  output logic [15:0] drop_cnt
);
  typedef struct packed {
    logic [31:0] size;
    logic [31:0] latency;
    logic [31:0] producer;
    logic [31:0] consumer;
  } report_t;

  // ---------------- capture ----------------
  logic [15:0] idx;        // index of the next flit within the packet
  logic [15:0] pkt_size;
  logic        watched;
  logic [31:0] t_hdr, ts;
  logic [31:0] prod;
  logic [15:0] cons_hi;

  report_t new_rep;
  logic    push;
  header_t h_in;

  assign h_in = header_t'(snoop_flit);

  always_comb begin
    new_rep.size     = {16'h0, pkt_size};
    new_rep.latency  = t_hdr - ts;
    new_rep.producer = prod;
    new_rep.consumer = {cons_hi, snoop_flit};
    push = snoop_valid && watched && idx == 16'd7 && pkt_size >= 16'd6;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx      <= '0;
      pkt_size <= '0;
      watched  <= 1'b0;
      t_hdr    <= '0;
      ts       <= '0;
      prod     <= '0;
      cons_hi  <= '0;
    end else if (snoop_valid) begin
      idx <= idx + 1'b1;
      case (idx)
        16'd0: begin
          watched <= h_in.mon && h_in.srv == SRV_MSG_DELIV;
          t_hdr   <= cur_time;
        end
        16'd1: pkt_size <= snoop_flit;
        16'd2: ts[31:16]   <= snoop_flit;
        16'd3: ts[15:0]    <= snoop_flit;
        16'd4: prod[31:16] <= snoop_flit;
        16'd5: prod[15:0]  <= snoop_flit;
        16'd6: cons_hi     <= snoop_flit;
        default: ;
      endcase
      // last flit of the packet: size flit index 1 plus pkt_size flits
      if ((idx == 16'd1 && snoop_flit == 16'd0) ||
          (idx >= 16'd2 && idx == pkt_size + 16'd1)) begin
        idx <= '0;
      end
    end
  end

  // ---------------- report queue ----------------
  report_t q_head;
  logic    q_empty, q_full, q_pop;

  flit_fifo #(.WIDTH($bits(report_t)), .DEPTH(REPORT_DEPTH)) u_q (
    .clk, .rst_n,
    .wr(push), .wr_data(new_rep),
    .rd(q_pop), .rd_data(q_head),
    .empty(q_empty), .full(q_full)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) drop_cnt <= '0;
    else if (push && q_full) drop_cnt <= drop_cnt + 1'b1;
  end

  // ---------------- sender ----------------
  logic [3:0] sidx;  // flit of the report being offered, 0..9
  header_t    h_out;

  always_comb begin
    h_out      = '0;
    h_out.prio = 1'b0;
    h_out.sw   = SW_PS;
    h_out.srv  = SRV_MON_REPORT;
    h_out.x    = master_addr[7:4];
    h_out.y    = master_addr[3:0];
    mon_valid  = !q_empty;
    case (sidx)
      4'd0: mon_flit = flit_t'(h_out);
      4'd1: mon_flit = 16'(MON_PAYLOAD_FLITS);
      4'd2: mon_flit = q_head.size[31:16];
      4'd3: mon_flit = q_head.size[15:0];
      4'd4: mon_flit = q_head.latency[31:16];
      4'd5: mon_flit = q_head.latency[15:0];
      4'd6: mon_flit = q_head.producer[31:16];
      4'd7: mon_flit = q_head.producer[15:0];
      4'd8: mon_flit = q_head.consumer[31:16];
      default: mon_flit = q_head.consumer[15:0];
    endcase
    q_pop = mon_valid && mon_ready && sidx == 4'd9;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sidx <= '0;
    else if (mon_valid && mon_ready) sidx <= (sidx == 4'd9) ? '0 : sidx + 1'b1;
  end
endmodule
