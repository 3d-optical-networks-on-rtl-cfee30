// Self-checking testbench of the electronic control unit, placed at mesh
// position (1,1). It sends setup and tail packets into chosen ports and
// checks: the XY output port, the one-cycle hop latency, the reserved
// output and the powered microresonator, a setup held back by a reserved
// output, release by the tail, a setup blocked by a not-ready neighbour,
// the acknowledge started at the destination and forwarded towards the
// path's owner.
module tb_ecu;
  import onoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] node_x = 1, node_y = 1;
  logic      [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  ctrl_pkt_t [NPORTS-1:0] in_pkt = '0, out_pkt;
  logic      [NPORTS-1:0] ack_in = '0, ack_out;
  logic      [NMR-1:0]    mr_on;
  logic      [NPORTS-1:0] resv_valid;
  port_e     [NPORTS-1:0] resv_src;

  int checks = 0, failures = 0;
  int cycle = 0;

  ecu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // what left on each port, with the cycle it was seen
  int        seen_cycle [NPORTS];
  ctrl_pkt_t seen_pkt   [NPORTS];
  int        seen_cnt   [NPORTS];
  always @(posedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (rst_n && out_valid[o] && out_ready[o]) begin
        seen_cycle[o] <= cycle;
        seen_pkt[o]   <= out_pkt[o];
        seen_cnt[o]   <= seen_cnt[o] + 1;
      end
    end
  end

  function automatic ctrl_pkt_t pkt(input pkt_type_e t, input int sx, input int sy, input int dx, input int dy);
    ctrl_pkt_t p;
    p = '0;
    p.ptype = t;
    p.src_x = COORD_W'(sx);
    p.src_y = COORD_W'(sy);
    p.dst_x = COORD_W'(dx);
    p.dst_y = COORD_W'(dy);
    return p;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [cycle %0d] %s", cycle, what);
    end
  endtask

  // Drive one packet into a port for one cycle; returns the cycle of the
  // edge that stored it.
  task automatic send(input int p, input ctrl_pkt_t k, output int at);
    @(negedge clk);
    in_valid[p] = 1'b1;
    in_pkt[p]   = k;
    @(posedge clk);
    at = cycle;
    @(negedge clk);
    in_valid[p] = 1'b0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, c0;
    for (int o = 0; o < NPORTS; o++) seen_cnt[o] = 0;
    wait_cycles(3);
    @(negedge clk) rst_n = 1;

    // 1. setup from the local core to (3,1): XY sends it east, one cycle later.
    c0 = seen_cnt[P_EAST];
    send(P_LOCAL, pkt(PKT_SETUP, 1, 1, 3, 1), t);
    wait_cycles(2);
    check("setup local->east leaves east", seen_cnt[P_EAST] == c0 + 1);
    check("setup hop latency is one cycle", seen_cycle[P_EAST] == t + 1);
    check("setup contents kept", seen_pkt[P_EAST] == pkt(PKT_SETUP, 1, 1, 3, 1));
    check("east reserved for local", resv_valid[P_EAST] && resv_src[P_EAST] == P_LOCAL);
    check("one MR powered, injection->east", mr_on == (NMR'(1) << mr_index(P_LOCAL, P_EAST)));

    // 2. a setup from the west also wants east: it must wait.
    c0 = seen_cnt[P_EAST];
    send(P_WEST, pkt(PKT_SETUP, 0, 1, 2, 1), t);
    wait_cycles(10);
    check("blocked setup held back", seen_cnt[P_EAST] == c0);
    check("reservation unchanged", resv_src[P_EAST] == P_LOCAL);

    // 3. ack from the east neighbour goes to the owner (the local core).
    @(negedge clk) ack_in[P_EAST] = 1'b1;
    @(negedge clk) ack_in[P_EAST] = 1'b0;
    check("ack forwarded to owner port, one cycle", ack_out == (NPORTS'(1) << P_LOCAL));
    @(negedge clk);
    check("ack is a single pulse", ack_out == '0);

    // 4. tail from the local core releases east; the waiting setup then goes.
    send(P_LOCAL, pkt(PKT_TAIL, 1, 1, 3, 1), t);
    wait_cycles(4);
    check("tail and waiting setup both left east", seen_cnt[P_EAST] == c0 + 2);
    check("last out on east is the west setup", seen_pkt[P_EAST] == pkt(PKT_SETUP, 0, 1, 2, 1));
    check("east now owned by west", resv_valid[P_EAST] && resv_src[P_EAST] == P_WEST);
    check("west->east straight powers no MR", mr_on == '0);

    // 5. setup from the north to this node: ejection reserved, ack back north.
    c0 = seen_cnt[P_LOCAL];
    fork
      send(P_NORTH, pkt(PKT_SETUP, 1, 3, 1, 1), t);
      begin
        logic got;
        got = 1'b0;
        repeat (6) begin
          @(negedge clk);
          if (ack_out[P_NORTH]) got = 1'b1;
        end
        check("destination acks towards the north", got);
      end
    join
    check("setup delivered to the core", seen_cnt[P_LOCAL] == c0 + 1);
    check("ejection reserved for north", resv_valid[P_LOCAL] && resv_src[P_LOCAL] == P_NORTH);
    check("MR north->ejection powered", mr_on[mr_index(P_NORTH, P_LOCAL)]);

    // 6. setup from the south to (1,3): straight north, no MR; neighbour
    //    not ready holds it back.
    @(negedge clk) out_ready[P_NORTH] = 1'b0;
    c0 = seen_cnt[P_NORTH];
    send(P_SOUTH, pkt(PKT_SETUP, 1, 0, 1, 3), t);
    wait_cycles(5);
    check("not-ready neighbour holds the packet", seen_cnt[P_NORTH] == c0 && !resv_valid[P_NORTH]);
    @(negedge clk) out_ready[P_NORTH] = 1'b1;
    wait_cycles(2);
    check("released packet leaves north", seen_cnt[P_NORTH] == c0 + 1);
    check("north owned by south", resv_valid[P_NORTH] && resv_src[P_NORTH] == P_SOUTH);
    check("only north->ejection MR is on", mr_on == (NMR'(1) << mr_index(P_NORTH, P_LOCAL)));

    // 7. two setups from different inputs to different outputs pass together.
    c0 = seen_cnt[P_SOUTH];
    fork
      send(P_LOCAL, pkt(PKT_SETUP, 1, 1, 1, 0), t);
      send(P_EAST,  pkt(PKT_SETUP, 2, 1, 0, 1), t);
    join
    wait_cycles(2);
    check("local setup went south", seen_cnt[P_SOUTH] == c0 + 1);
    check("east->west straight reserved", resv_valid[P_WEST] && resv_src[P_WEST] == P_EAST);
    check("three paths, two MRs", $countones(mr_on) == 2 &&
          mr_on[mr_index(P_LOCAL, P_SOUTH)] && mr_on[mr_index(P_NORTH, P_LOCAL)]);

    // 8. tails release everything.
    send(P_NORTH, pkt(PKT_TAIL, 1, 3, 1, 1), t);
    send(P_SOUTH, pkt(PKT_TAIL, 1, 0, 1, 3), t);
    send(P_LOCAL, pkt(PKT_TAIL, 1, 1, 1, 0), t);
    send(P_EAST,  pkt(PKT_TAIL, 2, 1, 0, 1), t);
    send(P_WEST,  pkt(PKT_TAIL, 0, 1, 2, 1), t);
    wait_cycles(3);
    check("all released", resv_valid == '0 && mr_on == '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
