// tb_aes_sbox: exhaustive check of the S-box table against the reference
// model's S-box (found by inverse search plus affine map) and against four
// published FIPS-197 entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1 expect_eq(y, sbox_tab[i], $sformatf("S(%02h)", i));
    end
    a = 8'h00; #1 expect_eq(y, 8'h63, "S(00)");
    a = 8'h01; #1 expect_eq(y, 8'h7c, "S(01)");
    a = 8'h53; #1 expect_eq(y, 8'hed, "S(53)");
    a = 8'hff; #1 expect_eq(y, 8'h16, "S(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
