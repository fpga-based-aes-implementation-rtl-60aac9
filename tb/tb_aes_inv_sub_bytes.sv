// tb_aes_inv_sub_bytes: checks aes_inv_sub_bytes against the reference model on 200 random
// states and on one published FIPS-197 example (SubBytes of round 1, Appendix B, reversed).
module tb_aes_inv_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_inv_sub_bytes dut (.din, .dout);

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
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 expect_eq(dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "published example");
    for (int i = 0; i < 200; i++) begin
      din = rand128();
      #1 expect_eq(dout, sub_bytes(din, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
