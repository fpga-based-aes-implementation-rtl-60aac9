// tb_aes_inv_sbox: exhaustive check of the inverse S-box table against the
// reference model's inverse S-box, and of four entries that follow from the
// published FIPS-197 S-box.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.a, .y);

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
      #1 expect_eq(y, inv_sbox_tab[i], $sformatf("InvS(%02h)", i));
    end
    a = 8'h63; #1 expect_eq(y, 8'h00, "InvS(63)");
    a = 8'h7c; #1 expect_eq(y, 8'h01, "InvS(7c)");
    a = 8'hed; #1 expect_eq(y, 8'h53, "InvS(ed)");
    a = 8'h00; #1 expect_eq(y, 8'h52, "InvS(00)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
