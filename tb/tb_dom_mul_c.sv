// tb_dom_mul_c: drives the Type C GF(2^2) multiplier with random three-share
// operands, square-scaler shares and refresh bits every cycle, and checks one
// cycle later that the XOR of the output shares equals A*B plus the unshared Sq
// term. It also checks that every output share changes between two runs with
// the same operands and different refresh bits. The field multiplication used
// as reference is the package function, checked against the AES S-box in
// tb_masked_sbox.
module tb_dom_mul_c;
  import aes_dom_pkg::*;
  localparam int unsigned W = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0][W-1:0] a, b, c;
  logic [2:0][W-1:0] sq; logic [5:0][W-1:0] z; logic [2:0][W-1:0] y;

  dom_mul_c dut (.a_i(a), .b_i(b), .sq_i(sq), .z_i(z), .y_i(y), .c_o(c), .clk_i(clk));

  logic [W-1:0] A, B, S, expv;
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
      S = 1'b1 ? (sq[0] ^ sq[1] ^ sq[2]) : '0;
      expv = W'(gf4_mul(A, B)) ^ S;
      a_prev = a; b_prev = b; sq_prev = sq;
      @(posedge clk); #1;
      checks++;
      if ((c[0] ^ c[1] ^ c[2]) !== expv) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h exp %h", c[0]^c[1]^c[2], expv);
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
