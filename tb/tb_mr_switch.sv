// Self-checking testbench of the microresonator switching element model:
// random light on both entering ports, ring powered off and on, outputs
// compared with the expected through/drop behaviour.
module tb_mr_switch;
  import onoc_pkg::*;

  logic power_on;
  opt_t in_light, add_light, through_light, drop_light;
  int   checks = 0, failures = 0;

  mr_switch dut (.*);

  task automatic check(input string what, input opt_t got, input opt_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    for (int n = 0; n < 200; n++) begin
      power_on  = n[0];
      in_light  = {1'b1, 32'($urandom)};
      add_light = n[1] ? {1'b1, 32'($urandom)} : OPT_DARK;
      #1;
      if (power_on) begin
        check("on: in -> drop", drop_light, in_light);
        check("on: through dark", through_light, OPT_DARK);
      end else begin
        check("off: in -> through", through_light, in_light);
        check("off: add -> drop", drop_light, add_light);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
