// qos_flow_manager: flow-adaptation part of the QoS manager of a cluster.
//
// Every communicating task pair (ctp) is in one of three flow modes:
// LOW priority (deterministic routing), HIGH priority (partially adaptive
// routing) or CS (circuit switching on channel 0).
//  * ChangeQoSFlow: a latency event for a pair restarts its idle timer and
//    moves LOW -> HIGH, or HIGH -> CS when cs_path_ok says a circuit path
//    is free (the check against the cluster's map of reserved ports is
//    supplied from outside); otherwise the mode stays.
//  * Time_Out_Monitor: every WINDOW cycles each pair that is not LOW adds
//    WINDOW to its idle timer; a HIGH pair whose timer has passed FCT returns
//    to LOW, a CS pair whose timer has passed CST releases its circuit and
//    returns to HIGH, and the timer restarts.
// Every mode change produces an adaptation order (ord_*: pair and new mode)
// for the adaptation module of the producer PE, one per cycle.
// Throughput events are not handled here: they request a computation
// adaptation (task migration or scheduling priority) and are passed on at
// comp_req_*.
//
// The three modes, the order of escalation, the timers and their defaults
// (1 ms window, FCt = 15 ms, CSt = 2 x FCt; 100 MHz assumed, so 100,000,
// 1,500,000 and 3,000,000 cycles) follow the description; in the described
// system this is software on the cluster master and here it is a hardware
// equivalent. Orders appear on ord_* in the cycle after the change.
module qos_flow_manager #(
  parameter int unsigned NCTP   = 4,
  parameter int unsigned WINDOW = 100000,
  parameter int unsigned FCT    = 1500000,
  parameter int unsigned CST    = 2 * FCT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // events from the throughput and latency monitors
  input  logic                    ev_valid,
  input  logic                    ev_throughput,
  input  logic [$clog2(NCTP)-1:0] ev_ctp,
  input  logic                    cs_path_ok,      // a circuit for ev_ctp is feasible
  // adaptation orders
  output logic                    ord_valid,
  output logic [$clog2(NCTP)-1:0] ord_ctp,
  output logic [1:0]              ord_mode,        // flow_mode_e
  // computation adaptation requests (throughput events)
  output logic                    comp_req_valid,
  output logic [$clog2(NCTP)-1:0] comp_req_ctp,
  // current modes
  output logic [NCTP-1:0][1:0]    mode_o
);
  localparam int unsigned CW = $clog2(NCTP);

  typedef enum logic [1:0] {
    FM_LOW  = 2'd0,
    FM_HIGH = 2'd1,
    FM_CS   = 2'd2
  } flow_mode_e;

  flow_mode_e [NCTP-1:0]  mode;
  logic [NCTP-1:0][31:0]  idle_t;
  logic [NCTP-1:0]        ord_pend;
  logic [31:0]            win;
  logic                   tick;

  assign tick = (win == 32'(WINDOW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode           <= {NCTP{FM_LOW}};
      idle_t         <= '0;
      ord_pend       <= '0;
      win            <= '0;
      comp_req_valid <= 1'b0;
      comp_req_ctp   <= '0;
    end else begin
      win <= tick ? '0 : win + 1;
      if (ord_valid) ord_pend[ord_ctp] <= 1'b0;
      // Time_Out_Monitor
      if (tick) begin
        for (int unsigned k = 0; k < NCTP; k++) begin
          if (mode[k] == FM_HIGH && idle_t[k] > 32'(FCT)) begin
            mode[k]     <= FM_LOW;
            idle_t[k]   <= '0;
            ord_pend[k] <= 1'b1;
          end else if (mode[k] == FM_CS && idle_t[k] > 32'(CST)) begin
            mode[k]     <= FM_HIGH;
            idle_t[k]   <= '0;
            ord_pend[k] <= 1'b1;
          end else if (mode[k] != FM_LOW) begin
            idle_t[k]   <= idle_t[k] + 32'(WINDOW);
          end
        end
      end
      // ChangeQoSFlow (an event takes precedence over a time-out of the same pair)
      comp_req_valid <= ev_valid && ev_throughput;
      comp_req_ctp   <= ev_ctp;
      if (ev_valid && !ev_throughput) begin
        idle_t[ev_ctp] <= '0;
        if (mode[ev_ctp] == FM_LOW) begin
          mode[ev_ctp]     <= FM_HIGH;
          ord_pend[ev_ctp] <= 1'b1;
        end else if (mode[ev_ctp] == FM_HIGH && cs_path_ok) begin
          mode[ev_ctp]     <= FM_CS;
          ord_pend[ev_ctp] <= 1'b1;
        end else begin
          mode[ev_ctp]     <= mode[ev_ctp];
        end
      end
    end
  end

  always_comb begin
    ord_valid = 1'b0;
    ord_ctp   = '0;
    for (int unsigned k = 0; k < NCTP; k++) begin
      if (!ord_valid && ord_pend[k]) begin
        ord_valid = 1'b1;
        ord_ctp   = CW'(k);
      end
    end
    ord_mode = mode[ord_ctp];
    for (int unsigned k = 0; k < NCTP; k++) mode_o[k] = mode[k];
  end
endmodule
