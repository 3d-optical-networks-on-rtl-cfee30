// Throughput sweep of the 8x8 optical NoC under uniform random traffic.
//
// Every core generates packets independently with exponentially distributed
// intervals, each to one of the other 63 nodes chosen uniformly, and queues
// them until its interface is free. The injection rate r is the offered load
// as a fraction of a core's 32 Gbit/s link, so the mean interval between
// packets of L words is L/r cycles and the offered network load is
// r * 64 * 32 Gbit/s. For every packet size (512 B, 2048 B, 4096 B) and
// rate (0.1, 0.3, 0.5) the network is reset, warmed up for 10000 cycles and
// then the delivered payload is counted over a measurement window.
// Checks: below saturation (r = 0.1) the delivered throughput matches the
// offered load within 15 %; at r = 0.5 the circuit-switched network is
// saturated (delivers clearly less than offered); 512 B packets at r = 0.1
// see a mean end-to-end delay below 1 us; every tail reports the length
// that was sent. The end-to-end (ETE) delay of a packet runs from its
// generation (queueing included) to the arrival of its last word. The
// measured throughputs and delays are printed.
module tb_onoc_uniform_traffic;
  import onoc_pkg::*;

  localparam int MX = 8;
  localparam int MY = 8;
  localparam int NN = MX * MY;
  localparam int WARMUP  = 10000;
  localparam int MEASURE = 15000;

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

  always #0.5 clk = ~clk;

  int  checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic   running = 0, measuring = 0;
  int     pkt_words = 128;
  real    rate = 0.1;
  longint delivered = 0;
  real    ete_sum = 0.0;
  int     ete_cnt = 0;
  int     bad_len = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar n = 0; n < NN; n++) begin : g_src
    int  pending = 0;
    real t_next = 0.0;
    real gen_q [$];      // generation times of queued packets
    real t_gen_cur = 0.0;
    assign tx_data[n] = 32'(n);

    always @(posedge clk) begin
      if (req_valid[n] && req_ready[n]) begin
        pending <= pending - 1;
        t_gen_cur = gen_q.pop_front();
      end
      // the last word reaches the destination in the cycle the tail is sent
      if (rst_n && running && tx_done[n] && measuring) begin
        ete_sum += real'(cycle) - t_gen_cur;
        ete_cnt++;
      end
      if (measuring && rx_tail_valid[n] && rx_words[n] != LEN_W'(pkt_words)) bad_len++;
    end

    always @(negedge clk) begin
      if (!running) begin
        req_valid[n] = 1'b0;
        pending = 0;
        gen_q.delete();
        t_next = real'(cycle) + (-$ln(real'($urandom_range(1, 1000000)) / 1000000.0) * real'(pkt_words) / rate);
      end else begin
        while (t_next <= real'(cycle)) begin
          pending++;
          gen_q.push_back(t_next);
          t_next += -$ln(real'($urandom_range(1, 1000000)) / 1000000.0) * real'(pkt_words) / rate;
        end
        if (!req_valid[n] && req_ready[n] && pending > 0) begin
          int d;
          do d = $urandom_range(0, NN - 1); while (d == n);
          req_dst_x[n] = COORD_W'(d % MX);
          req_dst_y[n] = COORD_W'(d / MX);
          req_len[n]   = LEN_W'(pkt_words);
          req_valid[n] = 1'b1;
        end else if (!req_ready[n]) begin
          req_valid[n] = 1'b0;
        end
      end
    end
  end

  always @(posedge clk) if (measuring) delivered <= delivered + longint'($countones(rx_valid));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  sizes [3] = '{128, 512, 1024};
    real rates [3] = '{0.1, 0.3, 0.5};
    real thr, offered;
    for (int n = 0; n < NN; n++) begin
      req_dst_x[n] = '0; req_dst_y[n] = '0; req_len[n] = '0;
    end
    foreach (sizes[s]) begin
      foreach (rates[r]) begin
        pkt_words = sizes[s];
        rate      = rates[r];
        running   = 0;
        @(negedge clk) rst_n = 0;
        repeat (4) @(posedge clk);
        @(negedge clk) rst_n = 1;
        running = 1;
        repeat (WARMUP) @(posedge clk);
        delivered = 0;
        ete_sum = 0.0;
        ete_cnt = 0;
        measuring = 1;
        repeat (MEASURE) @(posedge clk);
        measuring = 0;
        thr     = real'(delivered) * 32.0 / real'(MEASURE);    // Gbit/s at 1 GHz
        offered = rate * NN * 32.0;
        $display("packet %0d B  injection rate %0.2f  offered %0.1f Gbit/s  delivered %0.1f Gbit/s  mean ETE delay %0.3f us",
                 pkt_words * 4, rate, offered, thr, ete_sum / real'(ete_cnt) / 1000.0);
        if (s == 0 && r == 0) check("512 B at 0.1: ETE delay below 1 us", ete_sum / real'(ete_cnt) < 1000.0);
        if (r == 0) check($sformatf("%0d B at 0.1: delivered matches offered", pkt_words * 4),
                          thr > 0.85 * offered && thr < 1.15 * offered);
        if (r == 2) check($sformatf("%0d B at 0.5: network saturated", pkt_words * 4),
                          thr > 0.0 && thr < 0.8 * offered);
        check("throughput above zero", thr > 0.0);
      end
    end
    check("every tail reported the length sent", bad_len == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
