// tb_scratchpad: a reduced 1024-line scratchpad against a reference array.
// Checks the clear-on-reset sweep (length and cleared contents), random
// byte-masked writes, active-bit writes, read-before-write in one access and
// that every read answers exactly 3 cycles after it is issued.
module tb_scratchpad;
  import omega_pkg::*;
  localparam int L = 1024;
  logic clk = 0, rst_n = 0;
  logic init_done, req_valid = 0, we = 0, rvalid;
  logic [IDX_W-1:0] line = 0;
  logic [LINE_BYTES-1:0] wmask = 0;
  logic [LINE_W-1:0] wdata = 0, rdata;
  logic [MAX_PROPS-1:0] act_we = 0, act_wdata = 0, ract;
  int checks = 0, failures = 0;

  logic [LINE_W-1:0]    ref_mem [L];
  logic [MAX_PROPS-1:0] ref_act [L];
  // expected read results, indexed by the cycle they must appear in
  logic [LINE_W-1:0]    exp_d [int];
  logic [MAX_PROPS-1:0] exp_a [int];
  int cyc = 0;

  scratchpad #(.LINES(L)) dut (.clk, .rst_n, .init_done, .req_valid, .line, .we, .wmask, .wdata,
                               .act_we, .act_wdata, .rvalid, .rdata, .ract);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every rvalid with the expectation for that cycle
  always @(negedge clk) if (rst_n) begin
    if (rvalid || exp_d.exists(cyc)) begin
      checks++;
      if (!rvalid || !exp_d.exists(cyc) || rdata !== exp_d[cyc] || ract !== exp_a[cyc]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: rvalid %0d data %h act %b", cyc, rvalid, rdata, ract);
      end
    end
  end

  initial begin
    int t0;
    foreach (ref_mem[i]) begin ref_mem[i] = '0; ref_act[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!init_done) @(negedge clk);
    checks++;
    if (cyc - t0 != L) begin failures++; $display("FAIL init took %0d cycles", cyc - t0); end
    for (int i = 0; i < 6000; i++) begin
      int a;
      a = (i < 40) ? i : $urandom_range(0, 63);  // small set, many collisions
      req_valid = ($urandom_range(0, 3) != 0);
      line      = IDX_W'(a);
      we        = ($urandom_range(0, 1) == 1);
      wmask     = LINE_BYTES'($urandom);
      wdata     = {$urandom, $urandom, $urandom, $urandom};
      act_we    = MAX_PROPS'($urandom);
      act_wdata = MAX_PROPS'($urandom);
      if (req_valid) begin
        exp_d[cyc + SP_LAT] = ref_mem[a];    // read-before-write
        exp_a[cyc + SP_LAT] = ref_act[a];
        for (int b = 0; b < LINE_BYTES; b++)
          if (we && wmask[b]) ref_mem[a][b*8 +: 8] = wdata[b*8 +: 8];
        for (int k = 0; k < MAX_PROPS; k++)
          if (act_we[k]) ref_act[a][k] = act_wdata[k];
      end
      @(negedge clk);
    end
    req_valid = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
