// qd_hemps_mpsoc: the communication and monitoring fabric of a clustered
// MPSoC with runtime-adaptive QoS.
//
// MESH_W x MESH_H tiles form a 2D mesh. Every tile has a qos_router (two
// physical channels per link: channel 0 HIGH priority and circuits,
// channel 1 LOW priority) and a qos_ni with its packet monitor. The mesh is
// split into CLUSTER_W x CLUSTER_H clusters; the tile at offset
// (MASTER_DX, MASTER_DY) inside each cluster is its master. Packet monitors
// send their reports to their own cluster master. A master tile additionally has a tl_monitor, which reads
// the reports arriving at the master and raises latency and throughput
// events, and a qos_flow_manager, which turns latency events into flow-mode
// changes (LOW -> HIGH -> CS and back on time-outs) and issues adaptation
// orders.
//
// The processors, their memories and the software (microkernel, adaptation
// module, computation adaptation) are outside this module: each tile's PE
// port (pe_*) is brought out, as are the monitors' configuration, the
// circuit-feasibility answer and the adaptation orders of every cluster.
// cur_time is the global cycle counter that PEs stamp packets with and the
// packet monitors measure latency against.
//
// Tile index = y * MESH_W + x; cluster index = cy * (MESH_W/CLUSTER_W) + cx.
// A 4x4 mesh of four 2x2 clusters is the arrangement the monitoring scheme
// is presented with, and the default master is the bottom-right tile of its
// cluster, where the overview drawing of the clusters places it (y = 0 is the
// bottom row); the offset parameters are this design's choice.
module qd_hemps_mpsoc
  import qos_pkg::*;
#(
  parameter int unsigned MESH_W             = 4,
  parameter int unsigned MESH_H             = 4,
  parameter int unsigned CLUSTER_W          = 2,
  parameter int unsigned CLUSTER_H          = 2,
  parameter int unsigned MASTER_DX          = CLUSTER_W - 1,  // master tile inside its cluster
  parameter int unsigned MASTER_DY          = 0,
  parameter int unsigned BUF_DEPTH          = 8,
  parameter int unsigned REPORT_DEPTH       = 2,
  parameter int unsigned NCTP               = 4,
  parameter int unsigned VIOL_THRESHOLD     = 3,
  parameter int unsigned DEFAULT_RESOLUTION = 500000,
  parameter int unsigned WINDOW             = 100000,
  parameter int unsigned FCT                = 1500000,
  parameter int unsigned CST                = 2 * FCT,
  localparam int unsigned NPE = MESH_W * MESH_H,
  localparam int unsigned NCL = (MESH_W / CLUSTER_W) * (MESH_H / CLUSTER_H),
  localparam int unsigned CW  = $clog2(NCTP)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [31:0]                  cur_time,
  // processing element ports
  input  logic  [NPE-1:0]              pe_tx_valid,
  input  flit_t [NPE-1:0]              pe_tx_flit,
  output logic  [NPE-1:0]              pe_send_av,
  output logic  [NPE-1:0]              pe_rx_valid,
  output flit_t [NPE-1:0]              pe_rx_flit,
  input  logic  [NPE-1:0]              pe_rx_ready,
  output logic  [NPE-1:0]              cs_out_open,
  output logic  [NPE-1:0]              cs_in_open,
  output logic  [NPE-1:0][15:0]        mon_sent_cnt,
  output logic  [NPE-1:0][15:0]        mon_drop_cnt,
  output logic  [NPE-1:0][NPORT-1:0]   cs_reserved,
  // per cluster: monitor configuration (setQoSProducer / setRTResolution)
  input  logic  [NCL-1:0]              cfg_valid,
  input  logic  [CW-1:0]               cfg_idx,
  input  logic                         cfg_enable,
  input  logic  [31:0]                 cfg_producer,
  input  logic  [31:0]                 cfg_consumer,
  input  logic  [31:0]                 cfg_lat_deadline,
  input  logic  [31:0]                 cfg_thr_deadline,
  input  logic  [31:0]                 cfg_resolution,
  // per cluster: events, circuit feasibility and adaptation orders
  output logic  [NCL-1:0]              ev_valid,
  output logic  [NCL-1:0]              ev_throughput,
  output logic  [NCL-1:0][CW-1:0]      ev_ctp,
  input  logic  [NCL-1:0]              cs_path_ok,
  output logic  [NCL-1:0]              ord_valid,
  output logic  [NCL-1:0][CW-1:0]      ord_ctp,
  output logic  [NCL-1:0][1:0]         ord_mode,
  output logic  [NCL-1:0]              comp_req_valid,
  output logic  [NCL-1:0][CW-1:0]      comp_req_ctp,
  output logic  [NCL-1:0][NCTP-1:0][1:0] flow_mode
);
  localparam int unsigned NCX = MESH_W / CLUSTER_W;

  always_ff @(posedge clk) begin
    if (!rst_n) cur_time <= '0;
    else        cur_time <= cur_time + 1;
  end

  // router-side link bundles of every tile
  logic  [NPE-1:0][NPORT-1:0][NCH-1:0] r_rx, r_credit_o, r_tx, r_credit_i;
  flit_t [NPE-1:0][NPORT-1:0][NCH-1:0] r_din, r_dout;

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned T  = y * MESH_W + x;
      localparam int unsigned MX = (x / CLUSTER_W) * CLUSTER_W + MASTER_DX;
      localparam int unsigned MY = (y / CLUSTER_H) * CLUSTER_H + MASTER_DY;

      // ---- mesh links: input of this tile <- output of the neighbour ----
      for (genvar c = 0; c < NCH; c++) begin : g_c
        if (x + 1 < MESH_W) begin : g_e
          assign r_rx[T][P_EAST][c]       = r_tx[T+1][P_WEST][c];
          assign r_din[T][P_EAST][c]      = r_dout[T+1][P_WEST][c];
          assign r_credit_i[T][P_EAST][c] = r_credit_o[T+1][P_WEST][c];
        end else begin : g_ne
          assign r_rx[T][P_EAST][c]       = 1'b0;
          assign r_din[T][P_EAST][c]      = '0;
          assign r_credit_i[T][P_EAST][c] = 1'b0;
        end
        if (x > 0) begin : g_w
          assign r_rx[T][P_WEST][c]       = r_tx[T-1][P_EAST][c];
          assign r_din[T][P_WEST][c]      = r_dout[T-1][P_EAST][c];
          assign r_credit_i[T][P_WEST][c] = r_credit_o[T-1][P_EAST][c];
        end else begin : g_nw
          assign r_rx[T][P_WEST][c]       = 1'b0;
          assign r_din[T][P_WEST][c]      = '0;
          assign r_credit_i[T][P_WEST][c] = 1'b0;
        end
        if (y + 1 < MESH_H) begin : g_n
          assign r_rx[T][P_NORTH][c]       = r_tx[T+MESH_W][P_SOUTH][c];
          assign r_din[T][P_NORTH][c]      = r_dout[T+MESH_W][P_SOUTH][c];
          assign r_credit_i[T][P_NORTH][c] = r_credit_o[T+MESH_W][P_SOUTH][c];
        end else begin : g_nn
          assign r_rx[T][P_NORTH][c]       = 1'b0;
          assign r_din[T][P_NORTH][c]      = '0;
          assign r_credit_i[T][P_NORTH][c] = 1'b0;
        end
        if (y > 0) begin : g_s
          assign r_rx[T][P_SOUTH][c]       = r_tx[T-MESH_W][P_NORTH][c];
          assign r_din[T][P_SOUTH][c]      = r_dout[T-MESH_W][P_NORTH][c];
          assign r_credit_i[T][P_SOUTH][c] = r_credit_o[T-MESH_W][P_NORTH][c];
        end else begin : g_ns
          assign r_rx[T][P_SOUTH][c]       = 1'b0;
          assign r_din[T][P_SOUTH][c]      = '0;
          assign r_credit_i[T][P_SOUTH][c] = 1'b0;
        end
      end

      qos_router #(
        .MESH_W(MESH_W), .MESH_H(MESH_H), .X_ADDR(x), .Y_ADDR(y), .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk, .rst_n,
        .rx      (r_rx[T]),
        .data_in (r_din[T]),
        .credit_o(r_credit_o[T]),
        .tx      (r_tx[T]),
        .data_out(r_dout[T]),
        .credit_i(r_credit_i[T]),
        .cs_reserved_o(cs_reserved[T])
      );

      qos_ni #(.REPORT_DEPTH(REPORT_DEPTH)) u_ni (
        .clk, .rst_n,
        .cur_time,
        .master_addr({4'(MX), 4'(MY)}),
        .pe_tx_valid(pe_tx_valid[T]),
        .pe_tx_flit (pe_tx_flit[T]),
        .pe_send_av (pe_send_av[T]),
        .pe_rx_valid(pe_rx_valid[T]),
        .pe_rx_flit (pe_rx_flit[T]),
        .pe_rx_ready(pe_rx_ready[T]),
        .r_tx       (r_rx[T][P_LOCAL]),
        .r_data     (r_din[T][P_LOCAL]),
        .r_credit   (r_credit_o[T][P_LOCAL]),
        .l_tx       (r_tx[T][P_LOCAL]),
        .l_data     (r_dout[T][P_LOCAL]),
        .l_credit   (r_credit_i[T][P_LOCAL]),
        .cs_out_open(cs_out_open[T]),
        .cs_in_open (cs_in_open[T]),
        .mon_drop_cnt(mon_drop_cnt[T]),
        .mon_sent_cnt(mon_sent_cnt[T])
      );

      // ---- cluster master: monitors and flow manager ----
      if (x % CLUSTER_W == MASTER_DX && y % CLUSTER_H == MASTER_DY) begin : g_master
        localparam int unsigned CL = (y / CLUSTER_H) * NCX + (x / CLUSTER_W);
        logic [15:0] reports_seen;

        tl_monitor #(
          .NCTP(NCTP), .VIOL_THRESHOLD(VIOL_THRESHOLD), .DEFAULT_RESOLUTION(DEFAULT_RESOLUTION)
        ) u_tlm (
          .clk, .rst_n,
          .cfg_valid(cfg_valid[CL]), .cfg_idx, .cfg_enable,
          .cfg_producer, .cfg_consumer, .cfg_lat_deadline, .cfg_thr_deadline, .cfg_resolution,
          .rep_valid(pe_rx_valid[T] && pe_rx_ready[T]),
          .rep_flit (pe_rx_flit[T]),
          .ev_valid(ev_valid[CL]), .ev_throughput(ev_throughput[CL]), .ev_ctp(ev_ctp[CL]),
          .reports_seen
        );

        qos_flow_manager #(
          .NCTP(NCTP), .WINDOW(WINDOW), .FCT(FCT), .CST(CST)
        ) u_fm (
          .clk, .rst_n,
          .ev_valid(ev_valid[CL]), .ev_throughput(ev_throughput[CL]), .ev_ctp(ev_ctp[CL]),
          .cs_path_ok(cs_path_ok[CL]),
          .ord_valid(ord_valid[CL]), .ord_ctp(ord_ctp[CL]), .ord_mode(ord_mode[CL]),
          .comp_req_valid(comp_req_valid[CL]), .comp_req_ctp(comp_req_ctp[CL]),
          .mode_o(flow_mode[CL])
        );
      end
    end
  end
endmodule
