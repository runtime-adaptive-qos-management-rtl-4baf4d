// tl_monitor: throughput and latency monitors of a cluster master.
//
// It reads the monitoring packets (SRV_MON_REPORT) that the packet monitors
// of the cluster send to the master, from the flit stream the master's NI
// delivers (rep_valid/rep_flit, one flit per accepted cycle). Up to NCTP
// communicating task pairs (ctp) are configured through cfg_*, which carries
// what the setQoSProducer and setRTResolution calls define: producer and
// consumer task ids, latency deadline (cycles), throughput deadline (bits per
// window) and window length (0 selects DEFAULT_RESOLUTION).
//
// Latency monitor: each report of a configured pair whose latency is above
// the deadline is a violation. Throughput monitor: each report adds
// size x 16 bits to the pair's counter; when the pair's window ends, a count
// below the deadline is a violation and the counter restarts. VIOL_THRESHOLD
// violations of one kind make one event of that kind and restart that
// violation count. Events leave one per cycle on ev_* (a pulse with the pair
// index and the kind); events raised in the same cycle wait their turn.
//
// In the described system these monitors run as software on the cluster
// master; this block performs the same function in hardware so the
// monitoring chain can be exercised without a processor. The violation
// threshold of three and the default window of 500,000 cycles follow the
// description; NCTP, the configuration port and counter widths are this
// design's choices. Latency: an event is raised two cycles after the last
// flit of the report that caused it.
module tl_monitor
  import qos_pkg::*;
#(
  parameter int unsigned NCTP               = 4,
  parameter int unsigned VIOL_THRESHOLD     = 3,
  parameter int unsigned DEFAULT_RESOLUTION = 500000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration of one communicating task pair
  input  logic                    cfg_valid,
  input  logic [$clog2(NCTP)-1:0] cfg_idx,
  input  logic                    cfg_enable,
  input  logic [31:0]             cfg_producer,
  input  logic [31:0]             cfg_consumer,
  input  logic [31:0]             cfg_lat_deadline,
  input  logic [31:0]             cfg_thr_deadline,
  input  logic [31:0]             cfg_resolution,
  // flits received by the master
  input  logic                    rep_valid,
  input  flit_t                   rep_flit,
  // events to the QoS manager
  output logic                    ev_valid,
  output logic                    ev_throughput,   // 1 throughput, 0 latency
  output logic [$clog2(NCTP)-1:0] ev_ctp,
  // observation
  output logic [15:0]             reports_seen
);
  localparam int unsigned CW = $clog2(NCTP);
  localparam int unsigned VW = $clog2(VIOL_THRESHOLD + 1);

  typedef struct packed {
    logic        en;
    logic [31:0] producer;
    logic [31:0] consumer;
    logic [31:0] lat_dl;
    logic [31:0] thr_dl;
    logic [31:0] res;
  } ctp_cfg_t;

  ctp_cfg_t [NCTP-1:0]          cfg;
  logic [NCTP-1:0][31:0]        win_cnt;
  logic [NCTP-1:0][31:0]        bits;
  logic [NCTP-1:0][VW-1:0]      lat_viol, thr_viol;
  logic [NCTP-1:0]              lat_pend, thr_pend;

  // ---------------- report parser ----------------
  logic [15:0]  idx, psize;
  logic         is_rep;
  logic [127:0] rep;         // size, latency, producer, consumer
  logic         rep_done;    // a complete report is in rep
  header_t      h_in;
  assign h_in = header_t'(rep_flit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx          <= '0;
      psize        <= '0;
      is_rep       <= 1'b0;
      rep          <= '0;
      rep_done     <= 1'b0;
      reports_seen <= '0;
    end else begin
      rep_done <= 1'b0;
      if (rep_valid) begin
        idx <= idx + 1'b1;
        if (idx == 16'd0) is_rep <= (h_in.srv == SRV_MON_REPORT);
        if (idx == 16'd1) psize  <= rep_flit;
        if (idx >= 16'd2 && idx <= 16'd9) rep <= {rep[111:0], rep_flit};
        if ((idx == 16'd1 && rep_flit == '0) || (idx >= 16'd2 && idx == psize + 16'd1)) begin
          idx <= '0;
          if (is_rep && idx == 16'd9) begin
            rep_done     <= 1'b1;
            reports_seen <= reports_seen + 1'b1;
          end
        end
      end
    end
  end

  logic [31:0] r_size, r_lat, r_prod, r_cons;
  assign {r_size, r_lat, r_prod, r_cons} = rep;

  // ---------------- monitors ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg      <= '0;
      win_cnt  <= '0;
      bits     <= '0;
      lat_viol <= '0;
      thr_viol <= '0;
      lat_pend <= '0;
      thr_pend <= '0;
    end else begin
      for (int unsigned k = 0; k < NCTP; k++) begin
        if (cfg[k].en) begin
          // latency monitor and throughput accumulation
          if (rep_done && r_prod == cfg[k].producer && r_cons == cfg[k].consumer) begin
            bits[k] <= bits[k] + (r_size << 4);
            if (r_lat > cfg[k].lat_dl) begin
              if (lat_viol[k] == VW'(VIOL_THRESHOLD - 1)) begin
                lat_viol[k] <= '0;
                lat_pend[k] <= 1'b1;
              end else begin
                lat_viol[k] <= lat_viol[k] + 1'b1;
              end
            end
          end
          // throughput window
          if (win_cnt[k] + 1 >= cfg[k].res) begin
            win_cnt[k] <= '0;
            bits[k]    <= '0;
            if (bits[k] < cfg[k].thr_dl) begin
              if (thr_viol[k] == VW'(VIOL_THRESHOLD - 1)) begin
                thr_viol[k] <= '0;
                thr_pend[k] <= 1'b1;
              end else begin
                thr_viol[k] <= thr_viol[k] + 1'b1;
              end
            end
          end else begin
            win_cnt[k] <= win_cnt[k] + 1;
          end
        end
      end
      // one pending event leaves per cycle, latency first
      if (ev_valid) begin
        if (ev_throughput) thr_pend[ev_ctp] <= 1'b0;
        else               lat_pend[ev_ctp] <= 1'b0;
      end
      if (cfg_valid) begin
        cfg[cfg_idx].en       <= cfg_enable;
        cfg[cfg_idx].producer <= cfg_producer;
        cfg[cfg_idx].consumer <= cfg_consumer;
        cfg[cfg_idx].lat_dl   <= cfg_lat_deadline;
        cfg[cfg_idx].thr_dl   <= cfg_thr_deadline;
        cfg[cfg_idx].res      <= (cfg_resolution == '0) ? 32'(DEFAULT_RESOLUTION) : cfg_resolution;
        win_cnt[cfg_idx]      <= '0;
        bits[cfg_idx]         <= '0;
        lat_viol[cfg_idx]     <= '0;
        thr_viol[cfg_idx]     <= '0;
        lat_pend[cfg_idx]     <= 1'b0;
        thr_pend[cfg_idx]     <= 1'b0;
      end
    end
  end

  always_comb begin
    ev_valid      = 1'b0;
    ev_throughput = 1'b0;
    ev_ctp        = '0;
    for (int unsigned k = 0; k < NCTP; k++) begin
      if (!ev_valid && lat_pend[k]) begin
        ev_valid = 1'b1;
        ev_ctp   = CW'(k);
      end
    end
    for (int unsigned k = 0; k < NCTP; k++) begin
      if (!ev_valid && thr_pend[k]) begin
        ev_valid      = 1'b1;
        ev_throughput = 1'b1;
        ev_ctp        = CW'(k);
      end
    end
  end
endmodule
