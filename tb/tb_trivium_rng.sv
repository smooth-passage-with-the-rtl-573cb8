// tb_trivium_rng: compares the 64-bit-per-cycle Trivium with a bit-serial model
// written from the cipher's specification (1-based state s[1..288], one step per
// loop iteration). Checks the 18-cycle initialisation, 200 output words, a
// re-seed with a different key and IV, and that the output is zero until ready.
module tb_trivium_rng;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, seed, ready;
  logic [79:0] key, iv;
  logic [63:0] rnd;

  trivium_rng dut (.clk_i(clk), .rst_ni(rst_n), .seed_i(seed), .key_i(key), .iv_i(iv),
                   .rnd_o(rnd), .ready_o(ready));

  bit s [1:288];

  function automatic bit step();
    bit t1, t2, t3, z;
    t1 = s[66] ^ s[93];
    t2 = s[162] ^ s[177];
    t3 = s[243] ^ s[288];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (s[91] & s[92]) ^ s[171];
    t2 = t2 ^ (s[175] & s[176]) ^ s[264];
    t3 = t3 ^ (s[286] & s[287]) ^ s[69];
    for (int i = 93; i > 1; i--) s[i] = s[i-1];
    s[1] = t3;
    for (int i = 177; i > 94; i--) s[i] = s[i-1];
    s[94] = t1;
    for (int i = 288; i > 178; i--) s[i] = s[i-1];
    s[178] = t2;
    return z;
  endfunction

  task automatic run(int words);
    int c = 0;
    key = {$urandom, $urandom, 16'($urandom)};
    iv  = {$urandom, $urandom, 16'($urandom)};
    for (int i = 1; i <= 288; i++) s[i] = 1'b0;
    for (int i = 0; i < 80; i++) begin
      s[i + 1]  = key[i];
      s[i + 94] = iv[i];
    end
    s[286] = 1'b1; s[287] = 1'b1; s[288] = 1'b1;
    for (int i = 0; i < 1152; i++) void'(step());
    seed = 1'b1;
    @(posedge clk); #1;
    seed = 1'b0;
    while (!ready && c < 100) begin
      checks++;
      if (rnd !== '0) failures++;
      @(posedge clk); #1;
      c++;
    end
    checks++;
    if (c != 18) begin
      failures++;
      $display("ready after %0d cycles", c);
    end
    for (int w = 0; w < words; w++) begin
      logic [63:0] exp_v;
      for (int j = 0; j < 64; j++) exp_v[j] = step();
      @(posedge clk); #1;
      checks++;
      if (rnd !== exp_v) begin
        failures++;
        if (failures < 5) $display("word %0d got %h exp %h", w, rnd, exp_v);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; seed = 1'b0; key = '0; iv = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(200);
    run(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
