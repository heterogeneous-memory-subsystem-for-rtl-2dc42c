// tb_src_vertex_buffer: a reduced 4-entry buffer against a reference model
// with FIFO replacement: random fills and lookups over a small key space,
// refills of present keys, and flushes that must empty it.
module tb_src_vertex_buffer;
  import omega_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0, flush = 0, fill_valid = 0, lk_hit;
  logic [PROP_W-1:0] lk_prop = 0, fill_prop = 0;
  logic [VID_W-1:0] lk_vid = 0, fill_vid = 0;
  logic [DATA_W-1:0] lk_data, fill_data = 0;
  int checks = 0, failures = 0, hits = 0;

  logic [PROP_W+VID_W-1:0] mkey [E];
  logic [DATA_W-1:0]       mdat [E];
  bit                      mval [E];
  int                      mptr;

  src_vertex_buffer #(.ENTRIES(E)) dut (.clk, .rst_n, .flush, .lk_prop, .lk_vid, .lk_hit, .lk_data,
                                        .fill_valid, .fill_prop, .fill_vid, .fill_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mval[i]) mval[i] = 0;
    mptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      bit eh;
      logic [DATA_W-1:0] ed;
      lk_prop = PROP_W'($urandom_range(0, 1));
      lk_vid  = VID_W'($urandom_range(0, 5));
      #1;
      eh = 0; ed = 0;
      for (int e = 0; e < E; e++) if (mval[e] && mkey[e] == {lk_prop, lk_vid}) begin eh = 1; ed = mdat[e]; end
      checks++;
      if (lk_hit !== eh || (eh && lk_data !== ed)) begin
        failures++;
        if (failures < 10) $display("FAIL lookup %0d/%0d: hit %0d data %h expected %0d %h", lk_prop, lk_vid, lk_hit, lk_data, eh, ed);
      end
      hits += eh;
      flush      = ($urandom_range(0, 60) == 0);
      fill_valid = ($urandom_range(0, 2) == 0);
      fill_prop  = PROP_W'($urandom_range(0, 1));
      fill_vid   = VID_W'($urandom_range(0, 5));
      fill_data  = {$urandom, $urandom};
      @(negedge clk);
      if (flush) begin
        foreach (mval[e]) mval[e] = 0;
        mptr = 0;
      end else if (fill_valid) begin
        int f;
        f = -1;
        for (int e = 0; e < E; e++) if (mval[e] && mkey[e] == {fill_prop, fill_vid}) f = e;
        if (f >= 0) mdat[f] = fill_data;
        else begin
          mval[mptr] = 1; mkey[mptr] = {fill_prop, fill_vid}; mdat[mptr] = fill_data;
          mptr = (mptr + 1) % E;
        end
      end
      flush = 0; fill_valid = 0;
    end
    checks++;
    if (hits < 500) begin failures++; $display("FAIL only %0d hits", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
