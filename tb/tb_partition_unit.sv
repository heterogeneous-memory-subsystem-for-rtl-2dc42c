// tb_partition_unit: deals vertices out chunk by chunk to the nodes in
// turn, as the framework's static schedule does, and checks the home node and
// the local flag of every vertex for several chunk sizes.
module tb_partition_unit;
  import omega_pkg::*;
  logic [VID_W:0] chunk;
  logic [NODE_W-1:0] my_node, home;
  logic [VID_W-1:0] vid;
  logic is_local;
  int checks = 0, failures = 0;

  partition_unit dut (.chunk, .my_node, .vid, .home, .is_local);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [6] = '{1, 2, 3, 7, 64, 1000};
    foreach (sizes[s]) begin
      int node, left;
      chunk = (VID_W+1)'(sizes[s]);
      node = 0; left = sizes[s];
      for (int v = 0; v < 5000; v++) begin
        vid = VID_W'(v);
        my_node = NODE_W'($urandom_range(0, NUM_NODES - 1));
        #1;
        checks++;
        if (int'(home) != node || is_local !== (int'(my_node) == node)) begin
          failures++;
          if (failures < 10) $display("FAIL chunk %0d vid %0d: home %0d expected %0d", sizes[s], v, home, node);
        end
        left--;
        if (left == 0) begin
          left = sizes[s];
          node = (node + 1) % NUM_NODES;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
