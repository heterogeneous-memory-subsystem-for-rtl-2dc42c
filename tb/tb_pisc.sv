// tb_pisc: loads the four micro-programs of omega_tb_pkg over the
// configuration bus and runs random atomic commands of every type on random
// scratchpad lines. The written-back line, active bits and sparse-list pushes
// are compared with a behavioural model of each algorithm's update, and the
// PageRank update must write back exactly 5 cycles after start (four
// micro-ops and the write-back cycle). The sparse-list port is stalled at
// random to exercise the PUSH wait.
module tb_pisc;
  import omega_pkg::*;
  import omega_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0;
  cfg_t cfg;
  logic start = 0, busy, wb_valid, push_valid, push_ready;
  logic [LINE_W-1:0] s_line = 0, wb_line;
  logic [MAX_PROPS-1:0] s_act = 0, wb_act;
  logic [DATA_W-1:0] s_operand = 0;
  logic [OPT_W-1:0] s_optype = 0;
  logic [VID_W-1:0] s_vid = 0, push_vid;
  int checks = 0, failures = 0;
  int pushes = 0;

  pisc dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg, .start, .s_line, .s_act,
            .s_operand, .s_optype, .s_vid, .busy, .wb_valid, .wb_line, .wb_act,
            .push_valid, .push_ready, .push_vid);

  always #5 clk = ~clk;
  always @(posedge clk) push_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (push_valid && push_ready) pushes++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    push_ready = 1;
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < UCODE_DEPTH; j++) wr(CFG_UCODE + 8'(j), prog(j));
    for (int t = 0; t < 4; t++) wr(CFG_ENTRY + 8'(t), 64'(entry_of(t)));
    wr(CFG_GLOBAL + 0, 64'hFFFF_FFFF);
    wr(CFG_GLOBAL + 1, 64'd1);
    for (int i = 0; i < 3000; i++) begin
      int t, p0sz, lat, push_before;
      logic [127:0] l, el;
      logic [2:0] ea;
      logic [63:0] p0, p1, op;
      bit epush;
      t = $urandom_range(0, 3);
      p0sz = (t == T_PR) ? 8 : 4;
      cfg.type_size[0] = 4'(p0sz); cfg.type_size[1] = 4; cfg.type_size[2] = 4;
      cfg.prop_off[0] = 0; cfg.prop_off[1] = 4'(p0sz); cfg.prop_off[2] = 4'(p0sz + 4);
      l = {$urandom, $urandom, $urandom, $urandom};
      case (t)
        T_PR: begin
          l[63:0] = $realtobits(real'($urandom_range(0, 100000)) / 1024.0);
          op      = $realtobits(real'($urandom_range(0, 100000)) / 777.0);
        end
        T_BFS: begin
          if ($urandom_range(0, 1)) l[31:0] = 32'hFFFF_FFFF;
          op = 64'($urandom_range(0, 1 << 20));
        end
        T_SSSP: begin
          l[31:0]  = 32'($signed($urandom_range(0, 2000)) - 1000);
          l[63:32] = 32'($urandom_range(0, 1));
          op       = 64'($signed($urandom_range(0, 2000)) - 1000);
        end
        default: begin
          l[31:0] = $urandom_range(0, 5000);
          op      = 64'($urandom_range(0, 5000));
        end
      endcase
      // reference update
      el = l; ea = 3'($urandom); epush = 0;
      p0 = (p0sz == 8) ? l[63:0] : 64'(l[31:0]);
      p1 = 64'(l[p0sz*8 +: 32]);
      case (t)
        T_PR: el[63:0] = $realtobits($bitstoreal(p0) + $bitstoreal(op));
        T_BFS: if (p0 == 64'hFFFF_FFFF) begin el[31:0] = op[31:0]; epush = 1; end
        T_SSSP: if ($signed(op) < $signed(64'($signed(l[31:0])))) begin
                  el[31:0] = op[31:0];
                  if (p1 != 1) el[63:32] = 32'd1;
                end
        default: if (op < p0) el[31:0] = op[31:0];
      endcase
      s_act = ea;
      if ((t == T_BFS && epush) || (t == T_SSSP && el[31:0] != l[31:0] && p1 != 1) ||
          (t == T_CC && el[31:0] != l[31:0])) ea[0] = 1'b1;
      @(negedge clk);
      s_line = l; s_operand = op; s_optype = OPT_W'(t); s_vid = VID_W'($urandom);
      start = 1;
      push_before = pushes;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!wb_valid) begin @(negedge clk); lat++; end
      chk("line", wb_line, el);
      chk("act", 128'(wb_act), 128'(ea));
      if (t == T_PR) chk("PageRank latency", 128'(lat), 128'd5);
      @(negedge clk);
      chk("busy after wb", 128'(busy), 0);
      chk("pushes", 128'(pushes - push_before), 128'(epush));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
