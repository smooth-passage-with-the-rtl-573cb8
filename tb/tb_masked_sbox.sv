// tb_masked_sbox: checks the three-share S-box against an AES S-box computed
// here from first principles (inverse by x^254 in GF(2^8) mod x^8+x^4+x^3+x+1,
// then the FIPS-197 affine transform). A new random sharing with fresh random
// refresh bits is applied every cycle and every output is compared exactly four
// cycles later, which also checks the pipeline latency and full throughput.
// First all 256 inputs are run in order, then random ones; half of the run ties
// the Stage 3/4 inner-domain refresh to zero (the 78-bit configuration).
module tb_masked_sbox;
  import aes_dom_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0][7:0] x;
  sbox_rnd_t       rnd;
  logic [2:0][7:0] s;

  masked_sbox dut (.clk_i(clk), .x_i(x), .rnd_i(rnd), .s_o(s));

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] inv = 8'h01, r;
    for (int i = 0; i < 254; i++) inv = gmul(inv, v);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  logic [7:0] expect_q [$];

  task automatic apply(logic [7:0] v, bit full_rnd);
    logic [7:0] m0, m1, xx;
    m0 = 8'($urandom); m1 = 8'($urandom);
    xx = lin_map(v);
    x[0] = m0; x[1] = m1; x[2] = xx ^ m0 ^ m1;
    rnd = {$urandom, $urandom, $urandom, $urandom};
    if (!full_rnd) begin
      rnd.s3_y = '0; rnd.s4a_y = '0; rnd.s4b_y = '0;
    end
    expect_q.push_back(ref_sbox(v));
  endtask

  int n = 0;
  initial begin
    x = '0; rnd = '0;
    for (int k = 0; k < 1024; k++) begin
      apply(k < 256 ? 8'(k) : 8'($urandom), k >= 512);
      @(posedge clk); #1;
      n++;
      if (n >= 4) begin
        // output of the input applied 4 cycles before the latest edge
        checks++;
        if ((s[0] ^ s[1] ^ s[2]) !== expect_q[0]) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", s[0]^s[1]^s[2], expect_q[0]);
        end
        void'(expect_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
