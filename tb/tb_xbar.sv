// tb_xbar: random traffic from all 16 inputs to random outputs with random
// back-pressure. Every flit must arrive once, at the output it names, in
// order per input/output pair; an uncontended flit must cross in one cycle;
// and an output requested by several inputs must serve them all (no input
// starves under round-robin).
module tb_xbar;
  import omega_pkg::*;
  localparam int N = NUM_NODES;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [N-1:0] in_flit, out_flit;
  int checks = 0, failures = 0;
  int sent [N][N];
  int recv [N][N];
  int total = 0;
  bit traffic = 0;
  bit inject = 0;

  xbar #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!rst_n) begin
        in_valid[i] <= 0;
      end else if (!in_valid[i] || in_ready[i]) begin
        if (in_valid[i]) sent[i][in_flit[i].dst]++;
        if (inject && i == 3) begin
          flit_t f;
          f = '0;
          f.dst = 4'd9;
          f.src = 4'd3;
          f.data = 0;
          in_valid[i] <= 1;
          in_flit[i]  <= f;
        end else if (traffic && $urandom_range(0, 2) == 0) begin
          flit_t f;
          int d;
          d = $urandom_range(0, N - 1);
          f = '0;
          f.dst  = NODE_W'(d);
          f.src  = NODE_W'(i);
          f.data = 64'(sent[i][d]);
          in_valid[i] <= 1;
          in_flit[i]  <= f;
        end else in_valid[i] <= 0;
      end
    end
  end

  // sinks
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int s;
        s = out_flit[o].src;
        checks++;
        if (int'(out_flit[o].dst) != o || out_flit[o].data != 64'(recv[s][o])) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: src %0d dst %0d seq %0d expected %0d", o, s, out_flit[o].dst, out_flit[o].data, recv[s][o]);
        end
        recv[s][o]++;
        total++;
      end
      out_ready[o] <= ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    foreach (sent[i, j]) begin sent[i][j] = 0; recv[i][j] = 0; end
    in_flit = '0; out_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one uncontended flit: input 3 to output 9
    inject = 1;
    @(negedge clk);                 // flit offered on input 3
    inject = 0;
    @(negedge clk);                 // one cycle later it is on output 9
    checks++;
    if (!(out_valid[9] && out_flit[9].src == 4'd3)) begin failures++; $display("FAIL one-cycle crossing"); end
    repeat (5) @(negedge clk);
    traffic = 1;
    repeat (3000) @(negedge clk);
    traffic = 0;
    repeat (200) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (sent[i][o] != recv[i][o] || recv[i][o] == 0) begin
          failures++;
          $display("FAIL pair %0d->%0d sent %0d received %0d", i, o, sent[i][o], recv[i][o]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
