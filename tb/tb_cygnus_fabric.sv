// Self-checking testbench of the Cygnus optical switching fabric model.
// Every single connection input -> output is set up by powering the MR that
// belongs to it (none for the straight pairs), a random word is sent on the
// input and must appear on that output only. Then sets of simultaneous
// connections, the terminator of the injection waveguide and the number of
// MRs a path needs are checked.
module tb_cygnus_fabric;
  import onoc_pkg::*;

  logic [NMR-1:0]    mr_on;
  opt_t [NPORTS-1:0] light_in, light_out;
  int checks = 0, failures = 0;

  cygnus_fabric dut (.*);

  // Reference: which output light from input i reaches with the MR of
  // pair (i,o) powered, written out per port independently of the model.
  function automatic int straight_of(input int i);
    case (i)
      1: return 2;   // north in  -> south out
      2: return 1;   // south in  -> north out
      3: return 4;   // west in   -> east out
      4: return 3;   // east in   -> west out
      default: return -1; // injection: terminator
    endcase
  endfunction

  task automatic expect_out(input string what, input opt_t [NPORTS-1:0] exp);
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (light_out[o] !== exp[o]) begin
        failures++;
        $display("FAIL %s: out %0d got %h expected %h", what, o, light_out[o], exp[o]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opt_t [NPORTS-1:0] exp;
    opt_t w, w2, w3;
    int   nmr;

    // The fabric holds 16 MRs: 20 input/output pairs minus 4 straight ones.
    nmr = 0;
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        if (i != o && straight_of(i) != o) nmr++;
    checks++;
    if (nmr != 16 || NMR != 16) begin
      failures++;
      $display("FAIL MR count %0d / %0d", nmr, NMR);
    end

    // Every single connection.
    for (int i = 0; i < NPORTS; i++) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (i == o) continue;
        w = {1'b1, 32'($urandom)};
        light_in = '0;
        light_in[i] = w;
        mr_on = '0;
        if (straight_of(i) != o) mr_on[mr_index(i, o)] = 1'b1;
        #1;
        exp = '0;
        exp[o] = w;
        expect_out($sformatf("single %0d->%0d", i, o), exp);
        // a turn or the local port costs exactly one MR, straight costs none
        checks++;
        if ($countones(mr_on) != ((straight_of(i) == o) ? 0 : 1)) begin
          failures++;
          $display("FAIL MR count of %0d->%0d", i, o);
        end
        #1;
      end
    end

    // Injection light with no MR powered ends in the terminator.
    light_in = '0;
    light_in[0] = {1'b1, 32'hDEAD_BEEF};
    mr_on = '0;
    #1;
    expect_out("terminator", '0);

    // Three simultaneous paths: west->east straight, north->ejection,
    // injection->south.
    w  = {1'b1, 32'h1111_0001};
    w2 = {1'b1, 32'h2222_0002};
    w3 = {1'b1, 32'h3333_0003};
    light_in = '0;
    light_in[3] = w;
    light_in[1] = w2;
    light_in[0] = w3;
    mr_on = '0;
    mr_on[mr_index(1, 0)] = 1'b1;
    mr_on[mr_index(0, 2)] = 1'b1;
    #1;
    exp = '0;
    exp[4] = w;
    exp[0] = w2;
    exp[2] = w3;
    expect_out("three paths", exp);

    // Full permutation: injection->north, south->ejection, west->east,
    // east->west (both straight).
    light_in[0] = w;
    light_in[2] = w2;
    light_in[3] = w3;
    light_in[4] = {1'b1, 32'h4444_0004};
    light_in[1] = '0;
    mr_on = '0;
    mr_on[mr_index(0, 1)] = 1'b1;
    mr_on[mr_index(2, 0)] = 1'b1;
    #1;
    exp = '0;
    exp[1] = w;
    exp[0] = w2;
    exp[4] = w3;
    exp[3] = {1'b1, 32'h4444_0004};
    expect_out("permutation", exp);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
