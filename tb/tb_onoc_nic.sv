// Self-checking testbench of the network interface. The test plays the
// control unit and the optical network: it accepts the setup (once with a
// delay on ready), answers with an acknowledge after a random wait, and
// checks that the payload leaves at one word per cycle with the core's
// data, that the tail goes out with the last word (or, when refused, as
// soon as it is accepted), and the receive side's reporting.
module tb_onoc_nic;
  import onoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] node_x = 2, node_y = 5;
  logic               req_valid = 0, req_ready;
  logic [COORD_W-1:0] req_dst_x = 0, req_dst_y = 0;
  logic [LEN_W-1:0]   req_len = 0;
  logic [OPT_W-1:0]   tx_data;
  logic               tx_take, tx_done;
  logic               rx_valid, rx_setup_valid, rx_tail_valid;
  logic [OPT_W-1:0]   rx_data;
  logic [COORD_W-1:0] rx_src_x, rx_src_y;
  logic [LEN_W-1:0]   rx_words;
  logic               ctrl_tx_valid, ctrl_tx_ready = 0;
  ctrl_pkt_t          ctrl_tx_pkt;
  logic               ctrl_rx_valid = 0, ctrl_rx_ready;
  ctrl_pkt_t          ctrl_rx_pkt = '0;
  logic               ack_in = 0;
  opt_t               opt_tx, opt_rx = '0;

  int checks = 0, failures = 0, cycle = 0;
  int word_idx = 0;

  onoc_nic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // the core's payload: word k of the current packet is 0xC0DE0000 + k
  assign tx_data = 32'hC0DE_0000 + 32'(word_idx);
  always @(posedge clk) if (tx_take) word_idx <= word_idx + 1;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [cycle %0d] %s", cycle, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One transfer of len words to (dx,dy); tail_ready_late refuses the tail
  // for a few cycles.
  task automatic transfer(input int len, input int dx, input int dy, input int setup_wait,
                          input int ack_wait, input logic tail_ready_late);
    int first, last, words, tail_cycle;
    logic bad_data;
    word_idx = 0;
    @(negedge clk);
    req_valid = 1; req_dst_x = COORD_W'(dx); req_dst_y = COORD_W'(dy); req_len = LEN_W'(len);
    check("idle interface takes the request", req_ready);
    @(negedge clk) req_valid = 0;
    // setup offered to the control unit
    check("setup offered", ctrl_tx_valid && ctrl_tx_pkt.ptype == PKT_SETUP);
    check("setup addresses", ctrl_tx_pkt.src_x == node_x && ctrl_tx_pkt.src_y == node_y &&
                             ctrl_tx_pkt.dst_x == COORD_W'(dx) && ctrl_tx_pkt.dst_y == COORD_W'(dy));
    repeat (setup_wait) begin
      @(negedge clk);
      check("setup held until accepted", ctrl_tx_valid && ctrl_tx_pkt.ptype == PKT_SETUP);
    end
    ctrl_tx_ready = 1;
    @(negedge clk) ctrl_tx_ready = 0;
    // no light before the acknowledge
    repeat (ack_wait) begin
      check("dark until ack", !opt_tx.on && !ctrl_tx_valid && !req_ready);
      @(negedge clk);
    end
    ack_in = 1;
    @(negedge clk) ack_in = 0;
    // payload
    first = cycle; words = 0; bad_data = 0; tail_cycle = -1;
    ctrl_tx_ready = !tail_ready_late;
    while (opt_tx.on) begin
      if (opt_tx.bits != 32'hC0DE_0000 + 32'(words)) bad_data = 1;
      if (ctrl_tx_valid) begin
        check("tail with the last word", words == len - 1 && ctrl_tx_pkt.ptype == PKT_TAIL);
        tail_cycle = cycle;
      end
      words++;
      @(negedge clk);
    end
    last = cycle;
    check($sformatf("payload length %0d words", len), words == len);
    check("payload is the core's data in order", !bad_data);
    check("one word per cycle (32 Gbit/s at 1 GHz)", last - first == len);
    if (tail_ready_late) begin
      repeat (3) begin
        check("tail still offered", ctrl_tx_valid && ctrl_tx_pkt.ptype == PKT_TAIL);
        @(negedge clk);
      end
      ctrl_tx_ready = 1;
      #1;
      check("tail accepted late, done", tx_done);
      @(negedge clk);
    end else begin
      check("tail sent in last word's cycle", tail_cycle == last - 1);
    end
    ctrl_tx_ready = 0;
    #1;
    check("back to idle", req_ready && !opt_tx.on);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check("idle after reset", req_ready && !ctrl_tx_valid && !opt_tx.on);

    transfer(1, 3, 5, 0, 2, 0);
    transfer(128, 0, 0, 3, 7, 0);
    transfer(17, 7, 7, 1, 1, 1);
    for (int n = 0; n < 5; n++) transfer(1 + $urandom_range(0, 300), 0, $urandom_range(0, 4), $urandom_range(0, 3), $urandom_range(1, 20), n[0]);

    // receive side: setup from (6,1), 40 words, tail
    @(negedge clk);
    ctrl_rx_valid = 1; ctrl_rx_pkt = '0; ctrl_rx_pkt.ptype = PKT_SETUP;
    ctrl_rx_pkt.src_x = 6; ctrl_rx_pkt.src_y = 1; ctrl_rx_pkt.dst_x = node_x; ctrl_rx_pkt.dst_y = node_y;
    #1;
    check("setup reported to the core", rx_setup_valid && rx_src_x == 6 && rx_src_y == 1 && ctrl_rx_ready);
    @(negedge clk) ctrl_rx_valid = 0;
    for (int k = 0; k < 40; k++) begin
      opt_rx = {1'b1, 32'h5000 + 32'(k)};
      #1;
      check("received word passed to the core", rx_valid && rx_data == 32'h5000 + 32'(k));
      @(negedge clk);
    end
    opt_rx = '0;
    repeat (4) @(negedge clk);
    ctrl_rx_valid = 1; ctrl_rx_pkt.ptype = PKT_TAIL;
    #1;
    check("tail reports the word count", rx_tail_valid && rx_words == 40);
    @(negedge clk) ctrl_rx_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
