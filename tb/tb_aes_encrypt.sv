// tb_aes_encrypt: checks the iterative cipher core. The testbench plays the
// round-key store (a combinational table filled by the reference model's key
// expansion). It runs the FIPS-197 Appendix B and Appendix C.1 vectors and 50
// random key/plaintext pairs against the reference model, checks that done
// comes NR+1 cycles after the start cycle, that a start pulse while busy is
// ignored, and that the result holds after done.
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  localparam int NR = 10;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [127:0] din = '0, dout, rk;
  logic [3:0]   rk_idx;
  logic [127:0] keys [11];
  int checks = 0, failures = 0;

  aes_encrypt dut (.clk, .rst_n, .start, .din, .rk_idx, .rk, .busy, .done, .dout);

  assign rk = (rk_idx <= 4'd10) ? keys[rk_idx] : '0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [127:0] key, logic [127:0] data, logic [127:0] expected);
    int cycles = 0;
    ref_expand(key);
    for (int i = 0; i <= NR; i++) keys[i] = rk_tab[i];
    @(negedge clk);
    din   = data;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    // a second start while busy must not disturb the running block
    din   = ~data;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles++;
    while (!done && cycles < 40) begin
      check(busy, "busy during operation");
      @(negedge clk);
      cycles++;
    end
    check(cycles == NR + 1, $sformatf("latency %0d cycles, expected %0d", cycles, NR + 1));
    check(dout == expected, $sformatf("result %032h expected %032h", dout, expected));
    @(negedge clk);
    check(!done && !busy && dout == expected, "idle and result held after done");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 50; n++) begin
      logic [127:0] k, p;
      k = rand128();
      p = rand128();
      run(k, p, encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
