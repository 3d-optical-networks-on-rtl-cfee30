// 3D electronic-controlled optical network-on-chip: a MESH_X x MESH_Y mesh
// (8x8 by default) of Cygnus routers on a two-layer chip.
//
// Optical layer: the optical switching fabrics of all routers joined by
// bidirectional optical links (one waveguide per direction) carry payload
// as light, circuit-switched and unbuffered. Electronic layer: the control
// units joined by 32-bit bidirectional metallic links carry setup and tail
// packets, packet-switched with XY routing, and power the microresonators of
// the fabric above them. Each node also has a network interface for its
// functional core, which is attached to the control unit's local port and,
// through its EO/OE side, to the fabric's injection/ejection port.
//
// A transfer: the core requests (req_*), the interface sends a setup that
// reserves an optical path hop by hop, the destination's acknowledge comes
// back along that path, the payload streams at one 32-bit word per cycle
// (tx_take), and a tail sent with the last word tears the path down. The
// receiving core sees rx_setup_*, then the words on rx_valid/rx_data, then
// rx_tail_* with the word count.
//
// Light crosses the optical layer in zero time, so the mesh of fabrics holds
// structural combinational cycles through the microresonators of Y-to-X
// turns. XY routing never powers those, so no cycle ever closes; they are
// left in place rather than giving light an unphysical register delay.
//
// Interface: one entry per node in every array, node n = y*MESH_X + x,
// x growing east and y growing north. mr_on shows the 16 microresonator
// drive lines of every router, for power accounting. Links at the mesh
// edge are tied off (no light, no packets). The mesh size, the 32-bit
// links and the two-layer split follow the design; the edge tie-offs and
// the core-side ports are this design's own. Each router's reservation
// state (resv_valid/resv_src) is left unread here; it is there for
// observation by testbenches.
module optical_noc_3d
  import onoc_pkg::*;
#(
  parameter int unsigned MESH_X     = 8,
  parameter int unsigned MESH_Y     = 8,
  parameter int unsigned FIFO_DEPTH = 2,
  localparam int unsigned NNODES    = MESH_X * MESH_Y
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // functional cores: send
  input  logic [NNODES-1:0]        req_valid,
  output logic [NNODES-1:0]        req_ready,
  input  logic [COORD_W-1:0]       req_dst_x [NNODES],
  input  logic [COORD_W-1:0]       req_dst_y [NNODES],
  input  logic [LEN_W-1:0]         req_len   [NNODES],
  input  logic [OPT_W-1:0]         tx_data   [NNODES],
  output logic [NNODES-1:0]        tx_take,
  output logic [NNODES-1:0]        tx_done,
  // functional cores: receive
  output logic [NNODES-1:0]        rx_valid,
  output logic [OPT_W-1:0]         rx_data   [NNODES],
  output logic [NNODES-1:0]        rx_setup_valid,
  output logic [COORD_W-1:0]       rx_src_x  [NNODES],
  output logic [COORD_W-1:0]       rx_src_y  [NNODES],
  output logic [NNODES-1:0]        rx_tail_valid,
  output logic [LEN_W-1:0]         rx_words  [NNODES],
  // microresonator drive lines of every router
  output logic [NMR-1:0]           mr_on     [NNODES]
);

  // Per-node port bundles, indexed by node then by router port.
  logic      [NPORTS-1:0] c_in_valid  [NNODES];
  ctrl_pkt_t [NPORTS-1:0] c_in_pkt    [NNODES];
  logic      [NPORTS-1:0] c_in_ready  [NNODES];
  logic      [NPORTS-1:0] c_out_valid [NNODES];
  ctrl_pkt_t [NPORTS-1:0] c_out_pkt   [NNODES];
  logic      [NPORTS-1:0] c_out_ready [NNODES];
  logic      [NPORTS-1:0] a_in        [NNODES];
  logic      [NPORTS-1:0] a_out       [NNODES];
  opt_t      [NPORTS-1:0] l_in        [NNODES];
  opt_t      [NPORTS-1:0] l_out       [NNODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      logic [NPORTS-1:0]  resv_valid;
      port_e [NPORTS-1:0] resv_src;

      cygnus_router #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .node_x    (COORD_W'(x)),
        .node_y    (COORD_W'(y)),
        .in_valid  (c_in_valid[N]),
        .in_pkt    (c_in_pkt[N]),
        .in_ready  (c_in_ready[N]),
        .out_valid (c_out_valid[N]),
        .out_pkt   (c_out_pkt[N]),
        .out_ready (c_out_ready[N]),
        .ack_in    (a_in[N]),
        .ack_out   (a_out[N]),
        .light_in  (l_in[N]),
        .light_out (l_out[N]),
        .mr_on     (mr_on[N]),
        .resv_valid(resv_valid),
        .resv_src  (resv_src)
      );

      onoc_nic u_nic (
        .clk           (clk),
        .rst_n         (rst_n),
        .node_x        (COORD_W'(x)),
        .node_y        (COORD_W'(y)),
        .req_valid     (req_valid[N]),
        .req_ready     (req_ready[N]),
        .req_dst_x     (req_dst_x[N]),
        .req_dst_y     (req_dst_y[N]),
        .req_len       (req_len[N]),
        .tx_data       (tx_data[N]),
        .tx_take       (tx_take[N]),
        .tx_done       (tx_done[N]),
        .rx_valid      (rx_valid[N]),
        .rx_data       (rx_data[N]),
        .rx_setup_valid(rx_setup_valid[N]),
        .rx_src_x      (rx_src_x[N]),
        .rx_src_y      (rx_src_y[N]),
        .rx_tail_valid (rx_tail_valid[N]),
        .rx_words      (rx_words[N]),
        .ctrl_tx_valid (c_in_valid[N][P_LOCAL]),
        .ctrl_tx_pkt   (c_in_pkt[N][P_LOCAL]),
        .ctrl_tx_ready (c_in_ready[N][P_LOCAL]),
        .ctrl_rx_valid (c_out_valid[N][P_LOCAL]),
        .ctrl_rx_pkt   (c_out_pkt[N][P_LOCAL]),
        .ctrl_rx_ready (c_out_ready[N][P_LOCAL]),
        .ack_in        (a_out[N][P_LOCAL]),
        .opt_tx        (l_in[N][P_LOCAL]),
        .opt_rx        (l_out[N][P_LOCAL])
      );
      // The interface does not send acks into the router.
      assign a_in[N][P_LOCAL] = 1'b0;

      // ------------------------------------------------ mesh links
      // Each direction d: what arrives on port d comes from the neighbour's
      // opposite port; at the mesh edge nothing arrives and nothing leaves.
      if (y + 1 < MESH_Y) begin : g_n
        localparam int unsigned M = (y + 1) * MESH_X + x;
        assign c_in_valid[N][P_NORTH]  = c_out_valid[M][P_SOUTH];
        assign c_in_pkt[N][P_NORTH]    = c_out_pkt[M][P_SOUTH];
        assign c_out_ready[N][P_NORTH] = c_in_ready[M][P_SOUTH];
        assign a_in[N][P_NORTH]        = a_out[M][P_SOUTH];
        assign l_in[N][P_NORTH]        = l_out[M][P_SOUTH];
      end else begin : g_n_edge
        assign c_in_valid[N][P_NORTH]  = 1'b0;
        assign c_in_pkt[N][P_NORTH]    = '0;
        assign c_out_ready[N][P_NORTH] = 1'b0;
        assign a_in[N][P_NORTH]        = 1'b0;
        assign l_in[N][P_NORTH]        = OPT_DARK;
      end
      if (y > 0) begin : g_s
        localparam int unsigned M = (y - 1) * MESH_X + x;
        assign c_in_valid[N][P_SOUTH]  = c_out_valid[M][P_NORTH];
        assign c_in_pkt[N][P_SOUTH]    = c_out_pkt[M][P_NORTH];
        assign c_out_ready[N][P_SOUTH] = c_in_ready[M][P_NORTH];
        assign a_in[N][P_SOUTH]        = a_out[M][P_NORTH];
        assign l_in[N][P_SOUTH]        = l_out[M][P_NORTH];
      end else begin : g_s_edge
        assign c_in_valid[N][P_SOUTH]  = 1'b0;
        assign c_in_pkt[N][P_SOUTH]    = '0;
        assign c_out_ready[N][P_SOUTH] = 1'b0;
        assign a_in[N][P_SOUTH]        = 1'b0;
        assign l_in[N][P_SOUTH]        = OPT_DARK;
      end
      if (x > 0) begin : g_w
        localparam int unsigned M = y * MESH_X + x - 1;
        assign c_in_valid[N][P_WEST]  = c_out_valid[M][P_EAST];
        assign c_in_pkt[N][P_WEST]    = c_out_pkt[M][P_EAST];
        assign c_out_ready[N][P_WEST] = c_in_ready[M][P_EAST];
        assign a_in[N][P_WEST]        = a_out[M][P_EAST];
        assign l_in[N][P_WEST]        = l_out[M][P_EAST];
      end else begin : g_w_edge
        assign c_in_valid[N][P_WEST]  = 1'b0;
        assign c_in_pkt[N][P_WEST]    = '0;
        assign c_out_ready[N][P_WEST] = 1'b0;
        assign a_in[N][P_WEST]        = 1'b0;
        assign l_in[N][P_WEST]        = OPT_DARK;
      end
      if (x + 1 < MESH_X) begin : g_e
        localparam int unsigned M = y * MESH_X + x + 1;
        assign c_in_valid[N][P_EAST]  = c_out_valid[M][P_WEST];
        assign c_in_pkt[N][P_EAST]    = c_out_pkt[M][P_WEST];
        assign c_out_ready[N][P_EAST] = c_in_ready[M][P_WEST];
        assign a_in[N][P_EAST]        = a_out[M][P_WEST];
        assign l_in[N][P_EAST]        = l_out[M][P_WEST];
      end else begin : g_e_edge
        assign c_in_valid[N][P_EAST]  = 1'b0;
        assign c_in_pkt[N][P_EAST]    = '0;
        assign c_out_ready[N][P_EAST] = 1'b0;
        assign a_in[N][P_EAST]        = 1'b0;
        assign l_in[N][P_EAST]        = OPT_DARK;
      end
    end
  end

  // The control network is built for meshes whose coordinates fit a packet.
  initial begin
    assert (MESH_X <= (1 << COORD_W) && MESH_Y <= (1 << COORD_W))
      else $error("optical_noc_3d: mesh larger than the packet coordinates allow");
  end

endmodule
