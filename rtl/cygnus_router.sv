// One Cygnus 5x5 router of the 3D optical NoC: the electronic control unit
// (electronic layer) and the optical switching fabric (optical layer) it
// configures, joined by the 16 microresonator power lines that run through
// TSVs between the two layers.
//
// Control packets enter and leave on the five control ports (local,
// north, south, west, east; valid/ready, one 32-bit flit per cycle); the
// acknowledge runs on one wire per port in the opposite direction. Light
// enters and leaves on the five optical ports and crosses the router with
// zero delay along the connections the control unit has reserved. mr_on and
// resv_valid/resv_src expose the configuration for observation. The
// composition follows the router's description; the port bundles are this
// design's own.
module cygnus_router
  import onoc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [COORD_W-1:0]     node_x,
  input  logic [COORD_W-1:0]     node_y,
  input  logic [NPORTS-1:0]      in_valid,
  input  ctrl_pkt_t [NPORTS-1:0] in_pkt,
  output logic [NPORTS-1:0]      in_ready,
  output logic [NPORTS-1:0]      out_valid,
  output ctrl_pkt_t [NPORTS-1:0] out_pkt,
  input  logic [NPORTS-1:0]      out_ready,
  input  logic [NPORTS-1:0]      ack_in,
  output logic [NPORTS-1:0]      ack_out,
  input  opt_t [NPORTS-1:0]      light_in,
  output opt_t [NPORTS-1:0]      light_out,
  output logic [NMR-1:0]         mr_on,
  output logic [NPORTS-1:0]      resv_valid,
  output port_e [NPORTS-1:0]     resv_src
);


  ecu #(.FIFO_DEPTH(FIFO_DEPTH)) u_ecu (
    .clk       (clk),
    .rst_n     (rst_n),
    .node_x    (node_x),
    .node_y    (node_y),
    .in_valid  (in_valid),
    .in_pkt    (in_pkt),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_pkt   (out_pkt),
    .out_ready (out_ready),
    .ack_in    (ack_in),
    .ack_out   (ack_out),
    .mr_on     (mr_on),
    .resv_valid(resv_valid),
    .resv_src  (resv_src)
  );

  cygnus_fabric u_fabric (
    .mr_on    (mr_on),
    .light_in (light_in),
    .light_out(light_out)
  );

  // Light may leave only on an output that a path has reserved.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      light_out[o].on |-> resv_valid[o])
      else $error("cygnus_router: light on an output that was not reserved");
  end

endmodule
