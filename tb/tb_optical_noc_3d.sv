// End-to-end testbench of the 3D optical NoC at its default size (8x8).
//
// Phase 1 sends one packet alone across the longest path, (0,0) -> (7,7),
// and checks the path setup time: from the accepted request to the first
// payload word 2*hops+4 cycles in this implementation (one cycle into the
// source router, one per hop out, one to reserve the ejection port, one per
// hop for the acknowledge back, one to start sending) and the payload rate (one 32-bit word per
// cycle, i.e. 32 Gbit/s at 1 GHz).
// Phase 2 runs uniform random traffic: every core sends PKTS packets to
// destinations drawn uniformly from the other nodes, with payloads of
// 512 B to 4096 B (128 to 1024 words) and exponentially distributed gaps.
// Every word is checked at the receiver (source, sequence number and word
// index are coded into it), every packet must arrive exactly once with its
// length, and the network must end with no reservation left.
// Mechanisms counted, each of which must occur: a setup waiting for a
// reserved optical output, light passing a router straight with no MR on,
// light turned by an MR, ejection, acknowledges, path release by a tail.
// The microresonator budget is checked every cycle: at most three powered
// MRs per open path (one at the source, one turn, one at the destination).
module tb_optical_noc_3d;
  import onoc_pkg::*;

  localparam int MX   = 8;
  localparam int MY   = 8;
  localparam int NN   = MX * MY;
  localparam int PKTS = 8;
  localparam int MEAN_GAP = 200;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0]      req_valid = '0, req_ready;
  logic [COORD_W-1:0] req_dst_x [NN];
  logic [COORD_W-1:0] req_dst_y [NN];
  logic [LEN_W-1:0]   req_len   [NN];
  logic [OPT_W-1:0]   tx_data   [NN];
  logic [NN-1:0]      tx_take, tx_done;
  logic [NN-1:0]      rx_valid, rx_setup_valid, rx_tail_valid;
  logic [OPT_W-1:0]   rx_data   [NN];
  logic [COORD_W-1:0] rx_src_x  [NN];
  logic [COORD_W-1:0] rx_src_y  [NN];
  logic [LEN_W-1:0]   rx_words  [NN];
  logic [NMR-1:0]     mr_on     [NN];

  optical_noc_3d dut (.*);

  always #0.5 clk = ~clk;   // 1 GHz

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [cycle %0d] %s", cycle, what);
    end
  endtask

  // payload word: source node, sequence number, word index
  function automatic logic [31:0] word_of(input int src, input int seq, input int idx);
    return {8'(src), 4'(seq), 20'(idx)};
  endfunction

  // ------------------------------------------------------------ scoreboard
  int exp_dst [NN][16];
  int exp_len [NN][16];
  int got     [NN][16];
  int sent_total = 0, recv_total = 0;
  int word_errors = 0;
  int phase = 0;

  // ------------------------------------------------------------ core models
  int  first_take_cycle [NN];
  int  take_count       [NN];
  longint accept_cycle  [NN];

  for (genvar n = 0; n < NN; n++) begin : g_core
    int seq = 0;
    int widx = 0;
    int rx_src = 0, rx_seq = -1, rx_idx = 0, rx_first = 0;
    logic rx_bad = 0;

    assign tx_data[n] = word_of(n, seq, widx);

    always @(posedge clk) begin
      if (rst_n && tx_take[n]) begin
        if (widx == 0) first_take_cycle[n] <= int'(cycle);
        widx <= widx + 1;
        take_count[n] <= take_count[n] + 1;
      end
      if (rst_n && tx_done[n]) begin
        widx <= 0;
        seq  <= seq + 1;
      end
    end

    // receiver
    always @(posedge clk) begin
      if (rst_n) begin
        if (rx_setup_valid[n]) begin
          rx_src   <= int'(rx_src_y[n]) * MX + int'(rx_src_x[n]);
          rx_seq   <= -1;
          rx_idx   <= 0;
          rx_bad   <= 0;
        end
        if (rx_valid[n]) begin
          if (rx_data[n][31:24] != 8'(rx_src)) rx_bad <= 1;
          if (rx_data[n][19:0] != 20'(rx_idx)) rx_bad <= 1;
          if (rx_idx == 0) rx_seq <= int'(rx_data[n][23:20]);
          else if (int'(rx_data[n][23:20]) != rx_seq) rx_bad <= 1;
          rx_idx <= rx_idx + 1;
        end
        if (rx_tail_valid[n]) begin
          checks++;
          if (rx_bad || rx_seq < 0 || exp_dst[rx_src][rx_seq] != n ||
              exp_len[rx_src][rx_seq] != int'(rx_words[n]) || rx_idx != int'(rx_words[n]) ||
              got[rx_src][rx_seq] != 0) begin
            failures++;
            word_errors++;
            $display("FAIL [cycle %0d] node %0d: packet from %0d seq %0d: bad=%0d words=%0d idx=%0d",
                     cycle, n, rx_src, rx_seq, rx_bad, rx_words[n], rx_idx);
          end else begin
            got[rx_src][rx_seq] = 1;
          end
          recv_total++;
        end
      end
    end
  end

  // ------------------------------------------------------------ mechanisms
  int cnt_wait = 0, cnt_straight = 0, cnt_turn = 0, cnt_eject = 0;
  int cnt_ack = 0, cnt_release = 0, mr_violations = 0, max_mr = 0;
  int mr_total, open_paths;

  // A reserved output starts a chain when its owner is the injection port
  // or the upstream router has already released its side (tail passed):
  // each open path has exactly one chain start.
  int chain_starts [NN];

  for (genvar n = 0; n < NN; n++) begin : g_probe
    localparam int X = n % MX;
    localparam int Y = n / MX;
    always_comb begin
      chain_starts[n] = 0;
      for (int o = 0; o < NPORTS; o++) begin
        if (dut.g_y[Y].g_x[X].u_router.resv_valid[o]) begin
          case (dut.g_y[Y].g_x[X].u_router.resv_src[o])
            P_LOCAL: chain_starts[n]++;
            P_NORTH: if (!dut.g_y[(Y + 1) % MY].g_x[X].u_router.resv_valid[P_SOUTH]) chain_starts[n]++;
            P_SOUTH: if (!dut.g_y[(Y + MY - 1) % MY].g_x[X].u_router.resv_valid[P_NORTH]) chain_starts[n]++;
            P_WEST:  if (!dut.g_y[Y].g_x[(X + MX - 1) % MX].u_router.resv_valid[P_EAST]) chain_starts[n]++;
            default: if (!dut.g_y[Y].g_x[(X + 1) % MX].u_router.resv_valid[P_WEST]) chain_starts[n]++;
          endcase
        end
      end
    end
    always @(posedge clk) begin
      if (rst_n) begin
        for (int o = 1; o < NPORTS; o++) begin
          if (dut.g_y[Y].g_x[X].u_router.light_out[o].on) begin
            if (is_straight(int'(dut.g_y[Y].g_x[X].u_router.resv_src[o]), o)) cnt_straight++;
            else cnt_turn++;
          end
        end
        if (dut.g_y[Y].g_x[X].u_router.light_out[P_LOCAL].on) cnt_eject++;
        for (int i = 0; i < NPORTS; i++) begin
          if (dut.g_y[Y].g_x[X].u_router.u_ecu.head_valid[i] &&
              dut.g_y[Y].g_x[X].u_router.u_ecu.head_pkt[i].ptype == PKT_SETUP &&
              dut.g_y[Y].g_x[X].u_router.u_ecu.resv_valid[dut.g_y[Y].g_x[X].u_router.u_ecu.route[i]])
            cnt_wait++;
          if (dut.g_y[Y].g_x[X].u_router.u_ecu.pop[i] &&
              dut.g_y[Y].g_x[X].u_router.u_ecu.head_pkt[i].ptype == PKT_TAIL)
            cnt_release++;
        end
        if (dut.g_y[Y].g_x[X].u_router.ack_out[P_LOCAL]) cnt_ack++;
      end
    end
  end

  // power budget: at most 3 MRs per open path
  always @(negedge clk) begin
    if (rst_n) begin
      mr_total = 0;
      open_paths = 0;
      for (int n = 0; n < NN; n++) mr_total += $countones(mr_on[n]);
      for (int n = 0; n < NN; n++) open_paths += chain_starts[n];
      if (mr_total > 3 * open_paths) mr_violations++;
      if (mr_total > max_mr) max_mr = mr_total;
    end
  end

  // Progress watchdog: some payload word or control packet must move in
  // every window of 4000 cycles while traffic is outstanding.
  longint last_progress = 0;
  always @(posedge clk) begin
    if (|rx_valid || |tx_take || |rx_setup_valid || |rx_tail_valid || recv_total == sent_total)
      last_progress <= cycle;
    else if (rst_n && cycle - last_progress > 4000) begin
      failures++;
      $display("FAIL [cycle %0d] no progress for 4000 cycles: sent %0d received %0d", cycle, sent_total, recv_total);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent_total, recv_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  task automatic issue(input int n, input int d, input int len);
    @(negedge clk);
    req_valid[n] = 1'b1;
    req_dst_x[n] = COORD_W'(d % MX);
    req_dst_y[n] = COORD_W'(d / MX);
    req_len[n]   = LEN_W'(len);
    exp_dst[n][seq_of(n)] = d;
    exp_len[n][seq_of(n)] = len;
    sent_total++;
    @(posedge clk);
    accept_cycle[n] = cycle;
    @(negedge clk);
    req_valid[n] = 1'b0;
  endtask

  int next_seq [NN];
  function automatic int seq_of(input int n);
    return next_seq[n];
  endfunction

  // per-core traffic sources of phase 2
  for (genvar n = 0; n < NN; n++) begin : g_src
    initial begin
      int d, len, gap;
      real u;
      wait (phase == 1);
      for (int p = 0; p < PKTS; p++) begin
        u = (real'($urandom_range(1, 1000000))) / 1000000.0;
        gap = int'(-$ln(u) * MEAN_GAP);
        repeat (gap) @(posedge clk);
        do d = $urandom_range(0, NN - 1); while (d == n);
        len = 128 << $urandom_range(0, 3);   // 512 B .. 4096 B
        wait (req_ready[n]);
        issue(n, d, len);
        next_seq[n]++;
        @(negedge clk);
        wait (req_ready[n]);
      end
    end
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      req_dst_x[n] = '0; req_dst_y[n] = '0; req_len[n] = '0;
      next_seq[n] = 0; take_count[n] = 0; first_take_cycle[n] = 0; accept_cycle[n] = 0;
      for (int k = 0; k < 16; k++) begin exp_dst[n][k] = -1; exp_len[n][k] = 0; got[n][k] = 0; end
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);

    // ---------------- phase 1: one packet, longest path, idle network
    begin
      int src, dst, hops, len;
      longint t_acc;
      src = 0; dst = NN - 1; hops = (MX - 1) + (MY - 1); len = 512;
      issue(src, dst, len);
      next_seq[src]++;
      t_acc = accept_cycle[src];
      wait (tx_done[src]);
      @(posedge clk);
      @(negedge clk);
      $display("phase 1: accepted %0d, first word %0d, words %0d", t_acc, first_take_cycle[src], take_count[src]);
      check($sformatf("setup + ack over %0d hops takes 2*hops+4 cycles", hops),
            longint'(first_take_cycle[src]) - t_acc == longint'(2 * hops + 4));
      check("2048 B payload streamed in 512 cycles (32 Gbit/s)", take_count[src] == len);
      wait (recv_total == 1);
      check("isolated packet delivered", got[src][0] == 1);
      repeat (40) @(posedge clk);
    end

    // ---------------- phase 2: uniform random traffic
    phase = 1;
    wait (recv_total == sent_total && sent_total == 1 + NN * PKTS);
    repeat (50) @(posedge clk);

    // ---------------- end checks
    begin
      int missing;
      missing = 0;
      for (int n = 0; n < NN; n++)
        for (int k = 0; k < next_seq[n]; k++)
          if (got[n][k] != 1) missing++;
      check("every packet delivered exactly once", missing == 0 && word_errors == 0);
    end
    begin
      int left;
      left = 0;
      for (int n = 0; n < NN; n++) left += $countones(mr_on[n]);
      check("no microresonator left powered", left == 0);
    end
    check("at most 3 powered MRs per open path", mr_violations == 0);
    check("mechanism: setup waited for a reserved output", cnt_wait > 0);
    check("mechanism: straight passive passage", cnt_straight > 0);
    check("mechanism: MR turn", cnt_turn > 0);
    check("mechanism: ejection", cnt_eject > 0);
    check("mechanism: acknowledge reached the source", cnt_ack == sent_total);
    check("mechanism: tail release", cnt_release > 0);
    $display("packets %0d, cycles %0d, waits %0d, straight %0d, turn %0d, eject %0d, acks %0d, releases %0d, max MRs on %0d",
             sent_total, cycle, cnt_wait, cnt_straight, cnt_turn, cnt_eject, cnt_ack, cnt_release, max_mr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
