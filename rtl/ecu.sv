// Electronic control unit (ECU) of one Cygnus router, on the electronic
// layer of the 3D chip.
//
// What it does. The ECU is a 5-port packet-switched router for control
// packets (setup and tail, one 32-bit flit each) that also owns the
// configuration of the optical switching fabric above it:
//   * A setup packet is routed with XY routing. When it leaves through output
//     port o it reserves optical output o for the input port i it came from,
//     which powers the microresonator joining optical input i to output o
//     (no MR for straight east-west / north-south passage). A setup reaching
//     its destination reserves the ejection output and is handed to the local
//     core.
//   * A setup that finds its optical output reserved waits at the head of its
//     input buffer until the output is released.
//   * A tail packet follows the same XY route and releases, at each hop, the
//     optical output that its setup reserved.
//   * The acknowledge travels back along the reserved path, one hop per clock
//     cycle, on a 1-bit ack wire per link: the destination ECU starts it when
//     it reserves its ejection output, every ECU on the way forwards ack_in[o]
//     to the port that owns output o, and the source ECU hands it to its core.
//
// How it works. Each input port has a 2-entry FIFO. Each output port has a
// round-robin arbiter over the inputs whose head packet routes to it and is
// allowed to go (a tail always, a setup only while the output is free), and
// whose downstream buffer is ready. A packet crosses one router per cycle
// when nothing blocks it. Reservation state is one valid bit and one owner
// port per output.
//
// Interface: in_*/out_* are the five control ports (valid/ready, port order
// local, north, south, west, east), ack_in/ack_out the per-link acknowledge
// wires, mr_on the 16 microresonator power lines that go up through TSVs to
// the fabric, resv_valid/resv_src the reservation state (for observation).
// node_x/node_y give the router's mesh position. Synchronous active-low
// reset releases all reservations.
//
// The router's role (XY routing of control packets, reservation and release
// of optical ports, ack and circuit switching) follows the design; buffer
// depth, arbitration, the waiting rule for a blocked setup and the electrical
// ack path are this design's choices.
module ecu
  import onoc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COORD_W-1:0]        node_x,
  input  logic [COORD_W-1:0]        node_y,
  // control packets entering
  input  logic [NPORTS-1:0]         in_valid,
  input  ctrl_pkt_t [NPORTS-1:0]    in_pkt,
  output logic [NPORTS-1:0]         in_ready,
  // control packets leaving
  output logic [NPORTS-1:0]         out_valid,
  output ctrl_pkt_t [NPORTS-1:0]    out_pkt,
  input  logic [NPORTS-1:0]         out_ready,
  // acknowledge, travelling against the path direction
  input  logic [NPORTS-1:0]         ack_in,
  output logic [NPORTS-1:0]         ack_out,
  // optical fabric configuration
  output logic [NMR-1:0]            mr_on,
  output logic [NPORTS-1:0]         resv_valid,
  output port_e [NPORTS-1:0]        resv_src
);

  // ---------------------------------------------------------------- buffers
  logic      [NPORTS-1:0] head_valid;
  ctrl_pkt_t [NPORTS-1:0] head_pkt;
  logic      [NPORTS-1:0] pop;

  for (genvar i = 0; i < NPORTS; i++) begin : g_fifo
    ctrl_fifo #(.WIDTH($bits(ctrl_pkt_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_valid(in_valid[i]),
      .wr_ready(in_ready[i]),
      .wr_data (in_pkt[i]),
      .rd_valid(head_valid[i]),
      .rd_data (head_pkt[i]),
      .rd_pop  (pop[i])
    );
  end

  // ------------------------------------------------------- routing, requests
  port_e [NPORTS-1:0]                 route;
  logic  [NPORTS-1:0][NPORTS-1:0]     req;    // req[o][i]
  logic  [NPORTS-1:0][NPORTS-1:0]     grant;  // grant[o][i]

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      route[i] = xy_route(node_x, node_y, head_pkt[i].dst_x, head_pkt[i].dst_y);
    end
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = head_valid[i] && (route[i] == port_e'(o)) && out_ready[o] &&
                    ((head_pkt[i].ptype == PKT_TAIL) ||
                     (head_pkt[i].ptype == PKT_SETUP && !resv_valid[o]));
      end
    end
  end

  // ------------------------------------------------ round-robin arbitration
  logic [NPORTS-1:0][2:0] rr_ptr;   // first input to look at, per output

  always_comb begin
    grant = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int k = 0; k < NPORTS; k++) begin
        logic [2:0] idx;
        idx = 3'((int'(rr_ptr[o]) + k) % NPORTS);
        if (req[o][idx] && grant[o] == '0) grant[o][idx] = 1'b1;
      end
    end
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = 1'b0;
      out_pkt[o]   = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (grant[o][i]) begin
          out_valid[o] = 1'b1;
          out_pkt[o]   = head_pkt[i];
          pop[i]       = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------ reservations and ack
  logic [NPORTS-1:0] ack_next;

  always_comb begin
    ack_next = '0;
    for (int o = 0; o < NPORTS; o++) begin
      // ack coming back from downstream: pass it to the owner of output o
      if (ack_in[o] && resv_valid[o]) ack_next[resv_src[o]] = 1'b1;
      // a setup taking the ejection output starts the ack here
      for (int i = 0; i < NPORTS; i++) begin
        if (o == int'(P_LOCAL) && grant[o][i] && head_pkt[i].ptype == PKT_SETUP)
          ack_next[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resv_valid <= '0;
      resv_src   <= {NPORTS{P_LOCAL}};
      rr_ptr     <= '0;
      ack_out    <= '0;
    end else begin
      ack_out <= ack_next;
      for (int o = 0; o < NPORTS; o++) begin
        for (int i = 0; i < NPORTS; i++) begin
          if (grant[o][i]) begin
            rr_ptr[o] <= 3'((i + 1) % NPORTS);
            if (head_pkt[i].ptype == PKT_SETUP) begin
              resv_valid[o] <= 1'b1;
              resv_src[o]   <= port_e'(i);
            end else begin
              resv_valid[o] <= 1'b0;
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------ microresonator drive
  always_comb begin
    mr_on = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (has_mr(i, o) && resv_valid[o] && resv_src[o] == port_e'(i))
          mr_on[mr_index(i, o)] = 1'b1;
      end
    end
  end

  // ------------------------------------------------ protocol rules
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    for (genvar i = 0; i < NPORTS; i++) begin : g_chk_in
      // a tail only releases the output its own path reserved
      assert property (@(posedge clk) disable iff (!rst_n)
        (grant[o][i] && head_pkt[i].ptype == PKT_TAIL) |-> (resv_valid[o] && resv_src[o] == port_e'(i)))
        else $error("ecu: tail releases an output it does not own");
    end
    // an ack only comes back on an output that is reserved
    assert property (@(posedge clk) disable iff (!rst_n) ack_in[o] |-> resv_valid[o])
      else $error("ecu: ack on an unreserved output");
  end
  // control packets carry a type
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk_type
    assert property (@(posedge clk) disable iff (!rst_n)
      head_valid[i] |-> (head_pkt[i].ptype inside {PKT_SETUP, PKT_TAIL}))
      else $error("ecu: control packet without a type");
  end

endmodule
