// qos_ni: network interface between a processing element and the local port
// of its router, with the packet monitor inside.
//
// Sending: the PE writes a packet flit by flit (pe_tx_valid = data_write,
// pe_send_av = the NI takes the flit this cycle). The header decides the
// physical channel for the whole packet: circuit packets (CS_OPEN,
// CS_DATA, CS_RELEASE) and HIGH-priority packets go to channel 0, LOW
// packets to channel 1. While this PE holds an open circuit, channel 0 of
// the local port belongs to that circuit, so its other HIGH packets use
// channel 1. The packet monitor shares the outgoing port through a
// multiplexer: between packets, a waiting monitoring report takes the port
// and pe_send_av is held low until the report has left.
//
// Receiving: the two channels of the router's local output are merged into
// one flit stream to the PE (pe_rx_*, valid/ready), switching channel only
// between packets, round robin when both wait. Every accepted flit is shown
// to the packet monitor. cs_in_open tells the PE's software that a circuit
// towards it has been opened (set by CS_OPEN, cleared by CS_RELEASE).
//
// Channel choice by priority bit, the monitor multiplexer with send_av
// forced low and the monitor placed on the incoming path follow the
// description of the NI; the merge policy and cs_in_open's exact behaviour
// are this design's choices. All paths are combinational (no added latency).
module qos_ni
  import qos_pkg::*;
#(
  parameter int unsigned REPORT_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       cur_time,
  input  logic [7:0]        master_addr,
  // processor side, sending
  input  logic              pe_tx_valid,
  input  flit_t             pe_tx_flit,
  output logic              pe_send_av,
  // processor side, receiving
  output logic              pe_rx_valid,
  output flit_t             pe_rx_flit,
  input  logic              pe_rx_ready,
  // router local input (NI -> router)
  output logic  [NCH-1:0]   r_tx,
  output flit_t [NCH-1:0]   r_data,
  input  logic  [NCH-1:0]   r_credit,
  // router local output (router -> NI)
  input  logic  [NCH-1:0]   l_tx,
  input  flit_t [NCH-1:0]   l_data,
  output logic  [NCH-1:0]   l_credit,
  // status
  output logic              cs_out_open,   // this PE holds a circuit it opened
  output logic              cs_in_open,    // a circuit towards this PE is open
  output logic [15:0]       mon_drop_cnt,
  output logic [15:0]       mon_sent_cnt    // monitoring packets sent
);
  // ================= sending =================
  logic        mon_valid, mon_ready;
  flit_t       mon_flit;

  logic        o_busy, o_src_mon, o_ch;
  logic [1:0]  o_phase;
  logic [15:0] o_remain;

  logic        use_mon, src_valid, cur_ch, take;
  flit_t       src_flit;
  header_t     src_h;

  function automatic logic pick_channel(header_t hd, logic cs_open);
    if (hd.sw != SW_PS) return 1'b0;
    return (hd.prio && !cs_open) ? 1'b0 : 1'b1;
  endfunction

  always_comb begin
    use_mon   = o_busy ? o_src_mon : mon_valid;
    src_valid = use_mon ? mon_valid : pe_tx_valid;
    src_flit  = use_mon ? mon_flit  : pe_tx_flit;
    src_h     = header_t'(src_flit);
    cur_ch    = o_busy ? o_ch : pick_channel(src_h, cs_out_open);
    take      = src_valid && r_credit[cur_ch];
    pe_send_av = !use_mon && r_credit[cur_ch];
    mon_ready  = use_mon && r_credit[cur_ch];
    for (int c = 0; c < NCH; c++) begin
      r_tx[c]   = src_valid && (cur_ch == 1'(c));
      r_data[c] = src_flit;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_busy       <= 1'b0;
      o_src_mon    <= 1'b0;
      o_ch         <= 1'b0;
      o_phase      <= '0;
      o_remain     <= '0;
      cs_out_open  <= 1'b0;
      mon_sent_cnt <= '0;
    end else if (take) begin
      case (o_phase)
        2'd0: begin
          o_busy    <= 1'b1;
          o_src_mon <= use_mon;
          o_ch      <= cur_ch;
          o_phase   <= 2'd1;
          if (!use_mon && src_h.sw == SW_CS_OPEN) cs_out_open <= 1'b1;
          if (!use_mon && src_h.sw == SW_CS_REL)  cs_out_open <= 1'b0;
          if (use_mon) mon_sent_cnt <= mon_sent_cnt + 1'b1;
        end
        2'd1: begin
          o_remain <= src_flit;
          o_phase  <= 2'd2;
          if (src_flit == '0) begin
            o_busy  <= 1'b0;
            o_phase <= 2'd0;
          end
        end
        default: begin
          o_remain <= o_remain - 1'b1;
          if (o_remain == 16'd1) begin
            o_busy  <= 1'b0;
            o_phase <= 2'd0;
          end
        end
      endcase
    end
  end

  // ================= receiving =================
  logic        i_busy, i_ch, i_last_ch;
  logic [1:0]  i_phase;
  logic [15:0] i_remain;
  logic        sel, accept;
  header_t     rx_h;

  always_comb begin
    if (i_busy)                sel = i_ch;
    else if (l_tx[0] && l_tx[1]) sel = !i_last_ch;
    else                       sel = l_tx[0] ? 1'b0 : 1'b1;
    pe_rx_valid = l_tx[sel];
    pe_rx_flit  = l_data[sel];
    accept      = pe_rx_valid && pe_rx_ready;
    for (int c = 0; c < NCH; c++)
      l_credit[c] = pe_rx_ready && (sel == 1'(c));
    rx_h = header_t'(pe_rx_flit);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_busy     <= 1'b0;
      i_ch       <= 1'b0;
      i_last_ch  <= 1'b1;
      i_phase    <= '0;
      i_remain   <= '0;
      cs_in_open <= 1'b0;
    end else if (accept) begin
      case (i_phase)
        2'd0: begin
          i_busy    <= 1'b1;
          i_ch      <= sel;
          i_last_ch <= sel;
          i_phase   <= 2'd1;
          if (rx_h.sw == SW_CS_OPEN) cs_in_open <= 1'b1;
          if (rx_h.sw == SW_CS_REL)  cs_in_open <= 1'b0;
        end
        2'd1: begin
          i_remain <= pe_rx_flit;
          i_phase  <= 2'd2;
          if (pe_rx_flit == '0) begin
            i_busy  <= 1'b0;
            i_phase <= 2'd0;
          end
        end
        default: begin
          i_remain <= i_remain - 1'b1;
          if (i_remain == 16'd1) begin
            i_busy  <= 1'b0;
            i_phase <= 2'd0;
          end
        end
      endcase
    end
  end

  // ================= packet monitor =================
  packet_monitor #(.REPORT_DEPTH(REPORT_DEPTH)) u_mon (
    .clk, .rst_n,
    .cur_time,
    .master_addr,
    .snoop_valid(accept),
    .snoop_flit (pe_rx_flit),
    .mon_valid,
    .mon_flit,
    .mon_ready,
    .drop_cnt   (mon_drop_cnt)
  );

  // the PE is never offered the port while a report owns it
  a_mux_excl: assert property (@(posedge clk) disable iff (!rst_n)
    (o_busy && o_src_mon) |-> !pe_send_av);
endmodule
