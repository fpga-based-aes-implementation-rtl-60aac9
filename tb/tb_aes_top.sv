// tb_aes_top: end-to-end test of the AES-128 encryptor/decryptor at its
// default parameters (NR = 10).
//
// A driver issues block requests with the start/start_ready handshake and
// loads keys; a monitor checks every done pulse against a queue of expected
// results computed by the reference model at the time each request was
// accepted, and checks that done comes NR cycles after the accepting edge.
// The sequence covers the FIPS-197 Appendix B and C.1 vectors in both
// directions, round trips (decrypting each ciphertext again), a request
// stalled because no key schedule is ready, a request stalled behind a block
// in flight, a request stalled through a re-key, and switches between
// encryption and decryption. Each of those events is counted, and one that
// never happened counts as a failure.
module tb_aes_top;
  import aes_ref_pkg::*;
  localparam int NR = 10;

  typedef struct {
    logic [127:0] result;
    longint       accepted;
  } expect_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         key_load = 1'b0, key_ready, start = 1'b0, mode = 1'b0;
  logic [127:0] key_in = '0, data_in = '0, data_out;
  logic         start_ready, busy, done;

  aes_top dut (.clk, .rst_n, .key_load, .key_in, .key_ready, .start, .mode,
               .data_in, .start_ready, .busy, .done, .data_out);

  always #5 clk = ~clk;

  int      checks = 0, failures = 0;
  longint  cycle = 0;
  expect_t pending [$];
  logic [127:0] cur_key;
  int n_enc = 0, n_dec = 0, n_stall_key = 0, n_stall_busy = 0, n_stall_rekey = 0;
  int n_switch = 0, n_rekey = 0, n_done = 0;
  logic    last_mode = 1'b0;
  bit      have_last = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Monitor: sample in the middle of each cycle.
  always @(negedge clk) if (rst_n && done) begin
    n_done++;
    if (pending.size() == 0) check(0, "done with no request outstanding");
    else begin
      expect_t e;
      e = pending.pop_front();
      check(data_out == e.result,
            $sformatf("data_out %032h expected %032h", data_out, e.result));
      check(cycle - e.accepted == NR,
            $sformatf("done %0d cycles after accept, expected %0d", cycle - e.accepted, NR));
    end
  end

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    while (busy) @(negedge clk);
    key_in   = k;
    key_load = 1'b1;
    cur_key  = k;
    @(negedge clk);
    key_load = 1'b0;
    key_in   = rand128();
    n_rekey++;
  endtask

  // Issue one request and return once it has been accepted.
  task automatic request(logic m, logic [127:0] d, bit keep_key_in = 0);
    logic [127:0] exp;
    mode    = m;
    data_in = d;
    start   = 1'b1;
    while (!start_ready) begin
      if (!key_ready && !busy) n_stall_key++;
      if (busy) n_stall_busy++;
      @(negedge clk);
    end
    // start_ready is high for the coming edge: the request is taken there
    exp = m ? decrypt(cur_key, d) : encrypt(cur_key, d);
    begin
      expect_t e;
      e.result   = exp;
      e.accepted = cycle + 1;
      pending.push_back(e);
    end
    if (have_last && last_mode != m) n_switch++;
    last_mode = m;
    have_last = 1;
    if (m) n_dec++; else n_enc++;
    @(negedge clk);
    start   = 1'b0;
    data_in = rand128();
  endtask

  task automatic drain();
    while (pending.size() != 0) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!key_ready && !start_ready && !busy, "idle, no key after reset");

    // A request before any key: it must wait for the key schedule.
    fork
      begin
        repeat (4) @(negedge clk);
        load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
      end
      begin
        cur_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
        request(1'b0, 128'h3243f6a8885a308d313198a2e0370734);
      end
    join
    drain();
    check(data_out == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 Appendix B ciphertext");
    request(1'b1, 128'h3925841d02dc09fbdc118597196a0b32);
    drain();
    check(data_out == 128'h3243f6a8885a308d313198a2e0370734, "Appendix B decrypted");

    load_key(128'h000102030405060708090a0b0c0d0e0f);
    request(1'b0, 128'h00112233445566778899aabbccddeeff);
    request(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);  // stalls behind the first
    drain();
    check(data_out == 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypted");

    // A request held while a re-key runs.
    fork
      load_key(128'hffeeddccbbaa99887766554433221100);
      begin
        repeat (2) @(negedge clk);
        while (!start_ready && key_ready) @(negedge clk);
        if (!key_ready) n_stall_rekey++;
        request(1'b0, 128'h0123456789abcdeffedcba9876543210);
      end
    join
    drain();

    // Random traffic: random keys, modes and data, and round trips.
    for (int k = 0; k < 8; k++) begin
      load_key(rand128());
      for (int n = 0; n < 12; n++) begin
        logic [127:0] p;
        logic         m;
        p = rand128();
        m = 1'($urandom_range(1));
        request(m, p);
        if ($urandom_range(3) == 0) begin
          logic [127:0] c;
          c = m ? decrypt(cur_key, p) : encrypt(cur_key, p);
          request(!m, c);
          drain();
          check(data_out == p, "round trip returns the original block");
        end
      end
      drain();
    end

    repeat (3) @(negedge clk);
    check(pending.size() == 0, "every request completed");
    check(n_done == n_enc + n_dec, "one done per request");
    $display("encryptions=%0d decryptions=%0d mode_switches=%0d key_loads=%0d",
             n_enc, n_dec, n_switch, n_rekey);
    $display("stall_cycles: no_key=%0d behind_busy=%0d during_rekey_events=%0d",
             n_stall_key, n_stall_busy, n_stall_rekey);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_switch > 0, "mode switch happened");
    check(n_rekey > 1, "re-key happened");
    check(n_stall_key > 0, "stall for key schedule happened");
    check(n_stall_busy > 0, "stall behind a block in flight happened");
    check(n_stall_rekey > 0, "stall during re-key happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
