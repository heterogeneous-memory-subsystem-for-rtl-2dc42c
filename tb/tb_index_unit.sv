// tb_index_unit: deals vertices out to the nodes chunk by chunk and gives
// each node's vertices consecutive lines in arrival order; the index unit
// must reproduce those line numbers for several chunk sizes, and lines must
// never collide inside a node.
module tb_index_unit;
  import omega_pkg::*;
  logic [VID_W:0] chunk;
  logic [VID_W-1:0] vid;
  logic [IDX_W-1:0] line;
  int checks = 0, failures = 0;

  index_unit dut (.chunk, .vid, .line);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [6] = '{1, 2, 5, 16, 100, 4096};
    foreach (sizes[s]) begin
      int node, left;
      int next_line [NUM_NODES];
      chunk = (VID_W+1)'(sizes[s]);
      node = 0; left = sizes[s];
      foreach (next_line[n]) next_line[n] = 0;
      for (int v = 0; v < 20000; v++) begin
        vid = VID_W'(v);
        #1;
        checks++;
        if (int'(line) != next_line[node]) begin
          failures++;
          if (failures < 10) $display("FAIL chunk %0d vid %0d: line %0d expected %0d", sizes[s], v, line, next_line[node]);
        end
        next_line[node]++;
        left--;
        if (left == 0) begin
          left = sizes[s];
          node = (node + 1) % NUM_NODES;
        end
      end
    end
    // top of the range: last resident vertex of a full configuration
    chunk = 1; vid = '1; #1;
    checks++;
    if (line !== IDX_W'(SP_LINES - 1)) begin failures++; $display("FAIL last line %0d", line); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
