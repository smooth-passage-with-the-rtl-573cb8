// tb_dom_mul_a: drives the Type A DOM-indep multiplier, in GF(2^4) and in a
// second GF(2^2) instance, with random three-share operands and random refresh
// bits every cycle, and checks one cycle later that the XOR of the output
// shares equals the unshared product. It also checks that every output share
// changes between two runs with the same operands and different refresh bits,
// showing the refresh reaches each domain. The field multiplication used as
// reference is the package function, whose correctness is established against
// the AES S-box in tb_masked_sbox.
module tb_dom_mul_a;
  import aes_dom_pkg::*;
  localparam int unsigned W = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0][W-1:0] a, b, c;
  logic [2:0][W-1:0] z; logic [1:0][W-1:0] y; logic [2:0][W-1:0] sq;

  dom_mul_a #(.W(W)) dut (.a_i(a), .b_i(b), .z_i(z), .y_i(y), .c_o(c), .clk_i(clk));

  logic [W-1:0] A, B, S, expv;

  // second instance in GF(2^2), as used in Stage 3
  logic [2:0][1:0] a2, b2, z2, c2;
  logic [1:0][1:0] y2;
  logic [1:0]      exp2;
  dom_mul_a #(.W(2)) dut2 (.a_i(a2), .b_i(b2), .z_i(z2), .y_i(y2), .c_o(c2), .clk_i(clk));
  logic [2:0][W-1:0] a_prev, b_prev, sq_prev;
  logic [2:0][W-1:0] c_prev;
  int changed [3];

  initial begin
    for (int k = 0; k < 2000; k++) begin
      a = (W*3)'($urandom); b = (W*3)'($urandom);
      z = $bits(z)'({$urandom, $urandom});
      y = $bits(y)'($urandom);
      sq = (W*3)'($urandom);
      // repeat the operands of the previous iteration every other time
      if (k % 2 == 1) begin a = a_prev; b = b_prev; sq = sq_prev; end
      A = a[0] ^ a[1] ^ a[2];
      B = b[0] ^ b[1] ^ b[2];
      S = 1'b0 ? (sq[0] ^ sq[1] ^ sq[2]) : '0;
      expv = W'(gf_mul_w(W, 4'(A), 4'(B))) ^ S;
      a_prev = a; b_prev = b; sq_prev = sq;
      for (int i = 0; i < 3; i++) begin
        a2[i] = a[i][1:0] ^ a[i][3:2]; b2[i] = b[i][1:0]; z2[i] = z[i][3:2];
      end
      y2 = {y[0][3:2], y[1][1:0]};
      exp2 = gf4_mul(a2[0] ^ a2[1] ^ a2[2], b2[0] ^ b2[1] ^ b2[2]);
      @(posedge clk); #1;
      checks++;
      if ((c[0] ^ c[1] ^ c[2]) !== expv) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h exp %h", c[0]^c[1]^c[2], expv);
      end
      checks++;
      if ((c2[0] ^ c2[1] ^ c2[2]) !== exp2) begin
        failures++;
        if (failures < 10) $display("GF(2^2) mismatch: got %h exp %h", c2[0]^c2[1]^c2[2], exp2);
      end
      if (k % 2 == 1)
        for (int i = 0; i < 3; i++) if (c[i] != c_prev[i]) changed[i]++;
      c_prev = c;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (changed[i] < 500) begin
        failures++;
        $display("share %0d is not refreshed (%0d changes)", i, changed[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
