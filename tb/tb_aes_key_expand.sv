// tb_aes_key_expand: checks the key schedule. For the FIPS-197 Appendix A.1
// key it compares RoundKey[1] and RoundKey[10] with the published values,
// then for that key and 20 random keys compares all eleven round keys with
// the reference model. It also checks that ready rises exactly NR cycles
// after load and is low in between.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  localparam int NR = 10;
  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0, ready;
  logic [127:0] key = '0, rk;
  logic [3:0]   rk_idx = '0;
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk, .rst_n, .load, .key, .ready, .rk_idx, .rk);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic expand(logic [127:0] k);
    int cycles = 0;
    @(negedge clk);
    key  = k;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    key  = rand128();   // the key input need not be held
    while (!ready) begin
      cycles++;
      @(negedge clk);
      if (cycles > 50) break;
    end
    // load is sampled on one edge; ready must rise on the NR-th edge after it
    check(cycles == NR, $sformatf("ready %0d cycles after load, expected %0d", cycles, NR));
  endtask

  task automatic compare_all(logic [127:0] k);
    ref_expand(k);
    for (int i = 0; i <= NR; i++) begin
      rk_idx = 4'(i);
      #1 check(rk == rk_tab[i], $sformatf("RoundKey[%0d] = %032h expected %032h", i, rk, rk_tab[i]));
    end
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
    check(ready == 1'b0, "ready low after reset");
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rk_idx = 4'd1;
    #1 check(rk == 128'ha0fafe1788542cb123a339392a6c7605, "FIPS RoundKey[1]");
    rk_idx = 4'd10;
    #1 check(rk == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS RoundKey[10]");
    compare_all(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int n = 0; n < 20; n++) begin
      logic [127:0] k;
      k = rand128();
      expand(k);
      compare_all(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
