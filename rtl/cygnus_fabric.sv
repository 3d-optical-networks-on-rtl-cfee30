// Behavioural model of the Cygnus 5x5 optical switching fabric (the optical
// layer part of one router). Not synthesizable logic: the real part is
// waveguides, 16 microresonators and optical terminators; this model moves
// opt_t words the way light would, with zero delay and no buffering.
//
// Structure of the model. Every input port owns a waveguide that passes,
// in order of output port number, the MR elements that can turn its light
// towards another output. If none of them is powered the light reaches the
// end of the waveguide: inputs north/south/west/east continue passively to
// the opposite side (south/north/east/west), the injection input ends in an
// optical terminator. Every output port collects the drop ports of the MRs
// that can feed it, chained after the passive straight light. So straight
// east-west and north-south traffic powers no MR and every turn or use of the
// injection/ejection port powers exactly one MR, as the router is specified.
// The physical placement of the 16 MRs and the waveguide crossings is not
// reproduced; only the number of MRs and the passive straight routing are.
//
// Zero-delay light and a mesh of such fabrics: a mesh contains structural
// combinational cycles (for instance east -> north turn, then north -> west,
// west -> south and south -> east turns in three neighbours). Every such
// cycle passes a Y-to-X turn MR, which the XY-routed control network never
// powers, so no cycle is ever closed; the cycles stand because light has no
// register stage to break them. The injection waveguide's far end (the
// terminator) is left unread.
//
// Interface: mr_on[k] powers MR k (numbering in onoc_pkg::mr_index),
// light_in[p]/light_out[p] are the entering and leaving light of port p.
module cygnus_fabric
  import onoc_pkg::*;
(
  input  logic [NMR-1:0]          mr_on,
  input  opt_t [NPORTS-1:0]       light_in,
  output opt_t [NPORTS-1:0]       light_out
);

  // Every slot (i,o) carries r_in/r_out, the light on input i's waveguide
  // before and after the MR for output o, and c_in/c_out, the light on
  // output o's waveguide before and after the MR of input i. Pairs without
  // an MR pass both unchanged. Separate signals per slot keep the network
  // visibly acyclic.
  opt_t col_start [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_row
    for (genvar o = 0; o < NPORTS; o++) begin : g_col
      opt_t r_in, r_out, c_in, c_out;
      if (o == 0) begin : g_rfirst
        assign r_in = light_in[i];
      end else begin : g_rnext
        assign r_in = g_row[i].g_col[o-1].r_out;
      end
      if (i == 0) begin : g_cfirst
        assign c_in = col_start[o];
      end else begin : g_cnext
        assign c_in = g_row[i-1].g_col[o].c_out;
      end
      if (has_mr(i, o)) begin : g_mr
        mr_switch u_mr (
          .power_on     (mr_on[mr_index(i, o)]),
          .in_light     (r_in),
          .add_light    (c_in),
          .through_light(r_out),
          .drop_light   (c_out)
        );
      end else begin : g_pass
        assign r_out = r_in;
        assign c_out = c_in;
      end
    end
  end

  // Start of each output waveguide: the passive straight light, or dark for
  // the ejection output. The injection waveguide ends in a terminator.
  assign col_start[P_LOCAL] = OPT_DARK;
  assign col_start[P_NORTH] = g_row[P_SOUTH].g_col[NPORTS-1].r_out;
  assign col_start[P_SOUTH] = g_row[P_NORTH].g_col[NPORTS-1].r_out;
  assign col_start[P_WEST]  = g_row[P_EAST].g_col[NPORTS-1].r_out;
  assign col_start[P_EAST]  = g_row[P_WEST].g_col[NPORTS-1].r_out;

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign light_out[o] = g_row[NPORTS-1].g_col[o].c_out;
  end

endmodule
