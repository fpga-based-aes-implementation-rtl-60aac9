// tb_aes_add_round_key: checks AddRoundKey on the FIPS-197 Appendix B round 1
// example and on 200 random state/key pairs against a bitwise XOR.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, rk, dout;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.din, .rk, .dout);

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: got %032h expected %032h", got, exp);
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
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    rk  = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 expect_eq(dout, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 200; i++) begin
      din = rand128();
      rk  = rand128();
      #1 expect_eq(dout, din ^ rk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
