// Self-checking testbench of one Cygnus router (control unit plus optical
// fabric) at mesh position (2,2). Setup packets reserve paths; the test then
// shines light into the inputs and checks where it leaves: the injected
// light on the reserved output only, light entering from the west leaving
// on the ejection port, straight north-south light passing with no MR
// powered, and darkness once a tail has released a path.
module tb_cygnus_router;
  import onoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic      [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  ctrl_pkt_t [NPORTS-1:0] in_pkt = '0, out_pkt;
  logic      [NPORTS-1:0] ack_in = '0, ack_out;
  opt_t      [NPORTS-1:0] light_in = '0, light_out;
  logic      [NMR-1:0]    mr_on;
  logic      [NPORTS-1:0] resv_valid;
  port_e     [NPORTS-1:0] resv_src;

  int checks = 0, failures = 0;

  cygnus_router dut (
    .clk, .rst_n, .node_x(COORD_W'(2)), .node_y(COORD_W'(2)),
    .in_valid, .in_pkt, .in_ready, .out_valid, .out_pkt, .out_ready,
    .ack_in, .ack_out, .light_in, .light_out, .mr_on, .resv_valid, .resv_src
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input int p, input pkt_type_e t, input int dx, input int dy);
    @(negedge clk);
    in_valid[p] = 1'b1;
    in_pkt[p] = '0;
    in_pkt[p].ptype = t;
    in_pkt[p].dst_x = COORD_W'(dx);
    in_pkt[p].dst_y = COORD_W'(dy);
    @(negedge clk);
    in_valid[p] = 1'b0;
    @(negedge clk);
  endtask

  // Shine word w into input i alone and return what every output shows.
  task automatic shine(input int i, input opt_t w, output opt_t [NPORTS-1:0] got);
    light_in = '0;
    light_in[i] = w;
    #1;
    got = light_out;
    light_in = '0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opt_t [NPORTS-1:0] got;
    opt_t w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // path 1: injection -> east (destination (5,2))
    send(P_LOCAL, PKT_SETUP, 5, 2);
    w = {1'b1, 32'hA5A5_0001};
    shine(P_LOCAL, w, got);
    check("injected light leaves east", got[P_EAST] == w);
    check("nowhere else", got[P_NORTH] == '0 && got[P_SOUTH] == '0 && got[P_WEST] == '0 && got[P_LOCAL] == '0);

    // path 2: west -> ejection (destination is this node)
    send(P_WEST, PKT_SETUP, 2, 2);
    w = {1'b1, 32'hA5A5_0002};
    shine(P_WEST, w, got);
    check("west light ejected", got[P_LOCAL] == w && got[P_EAST] == '0);

    // path 3: south -> north straight (destination (2,6)), no extra MR
    send(P_SOUTH, PKT_SETUP, 2, 6);
    w = {1'b1, 32'hA5A5_0003};
    shine(P_SOUTH, w, got);
    check("south light passes north", got[P_NORTH] == w && got[P_LOCAL] == '0);
    check("two MRs for three paths", $countones(mr_on) == 2);

    // all three at once
    light_in = '0;
    light_in[P_LOCAL] = {1'b1, 32'h1};
    light_in[P_WEST]  = {1'b1, 32'h2};
    light_in[P_SOUTH] = {1'b1, 32'h3};
    #1;
    check("three simultaneous paths", light_out[P_EAST] == {1'b1, 32'h1} &&
          light_out[P_LOCAL] == {1'b1, 32'h2} && light_out[P_NORTH] == {1'b1, 32'h3} &&
          light_out[P_WEST] == '0 && light_out[P_SOUTH] == '0);
    light_in = '0;

    // tail releases path 1: injected light now ends in the terminator
    send(P_LOCAL, PKT_TAIL, 5, 2);
    w = {1'b1, 32'hA5A5_0004};
    shine(P_LOCAL, w, got);
    check("released injection goes dark", got == '0);
    check("east free again", !resv_valid[P_EAST]);

    // the injection port is free again: a new path towards the south
    send(P_LOCAL, PKT_SETUP, 2, 0);
    w = {1'b1, 32'hA5A5_0005};
    shine(P_LOCAL, w, got);
    check("injection re-used towards south", got[P_SOUTH] == w);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
