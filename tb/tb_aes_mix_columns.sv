// tb_aes_mix_columns: checks aes_mix_columns against the reference model on 200 random
// states and on one published FIPS-197 example (MixColumns of round 1, Appendix B).
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.din, .dout);

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in %032h got %032h expected %032h", what, din, got, exp);
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
    ref_init();
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1 expect_eq(dout, 128'h046681e5e0cb199a48f8d37a2806264c, "published example");
    for (int i = 0; i < 200; i++) begin
      din = rand128();
      #1 expect_eq(dout, mix_columns(din, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
