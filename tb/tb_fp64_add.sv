// tb_fp64_add: checks the double-precision adder against the simulator's own
// IEEE double arithmetic on directed corner cases (zeros, infinities, NaN,
// cancellation, subnormals, rounding ties, overflow) and on random operands
// drawn from several exponent ranges. NaN results are compared by class.
module tb_fp64_add;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;

  fp64_add dut (.a(a), .b(b), .y(y));

  function automatic logic is_nan(input logic [63:0] v);
    return (v[62:52] == 11'h7FF) && (v[51:0] != '0);
  endfunction

  task automatic check(input logic [63:0] x, input logic [63:0] z);
    logic [63:0] ref_y;
    a = x; b = z;
    #1;
    ref_y = $realtobits($bitstoreal(x) + $bitstoreal(z));
    checks++;
    if (is_nan(ref_y) ? !is_nan(y) : (y !== ref_y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h = %h expected %h", x, z, y, ref_y);
    end
  endtask

  function automatic logic [63:0] rnd_fp(input int cls);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (cls)
      0: v[62:52] = 11'd0;                               // subnormal
      1: v[62:52] = 11'(1023 + ($urandom % 64) - 32);    // moderate
      2: v[62:52] = 11'($urandom % 2047);                // any finite
      default: v[62:52] = 11'(2046 - ($urandom % 3));    // near overflow
    endcase
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h3FF0000000000000, 64'h3FF0000000000000);   // 1+1
    check(64'h3FF0000000000000, 64'hBFF0000000000000);   // 1-1
    check(64'h8000000000000000, 64'h8000000000000000);   // -0 + -0
    check(64'h0000000000000000, 64'h8000000000000000);
    check(64'h7FF0000000000000, 64'h3FF0000000000000);   // inf
    check(64'h7FF0000000000000, 64'hFFF0000000000000);   // inf - inf
    check(64'h7FF8000000000001, 64'h3FF0000000000000);   // NaN
    check(64'h0000000000000001, 64'h0000000000000001);   // subnormals
    check(64'h000FFFFFFFFFFFFF, 64'h0000000000000001);   // to normal
    check(64'h0010000000000000, 64'h8000000000000001);   // to subnormal
    check(64'h3FF0000000000000, 64'h3CA0000000000000);   // tie, even
    check(64'h3FF0000000000001, 64'h3CA0000000000000);   // tie, odd
    check(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF);   // overflow
    check(64'h3FF0000000000000, 64'hBCA0000000000000);
    check(64'h4340000000000000, 64'hBFF0000000000000);   // 2^53 - 1
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] x, z;
      x = rnd_fp($urandom % 4);
      z = rnd_fp($urandom % 4);
      if ($urandom % 4 == 0) z[62:52] = x[62:52] - 11'($urandom % 3); // cancellation
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
