// tb_omega_node: one complete node (node 5, reduced 512-line scratchpad)
// configured only through its configuration bus. Node 5 owns vertices
// 80..95 with chunk 16. The testbench checks a PageRank fp add, a BFS claim
// that sets the dense active bit and pushes the vertex to the sparse list
// (and a second claim that must not), an SSSP min through the signed-compare
// micro-program, a remote read packet and its reply reaching the core, and
// the source buffer filling and being flushed by iter_end.
module tb_omega_node;
  import omega_pkg::*;
  import omega_tb_pkg::*;
  logic clk = 0, rst_n = 0, init_done;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0;
  logic iter_end = 0;
  logic core_req_valid = 0, core_req_ready, core_to_cache, core_resp_valid;
  core_req_t core_req;
  logic [DATA_W-1:0] core_resp_data;
  logic rq_out_valid, rq_in_valid = 0, rq_in_ready, rs_out_valid, rs_in_valid, rs_in_ready;
  flit_t rq_out_flit, rq_in_flit, rs_out_flit, rs_in_flit;
  logic push_valid;
  logic [VID_W-1:0] push_vid;
  ev_t ev;
  int checks = 0, failures = 0, cyc = 0, pushes = 0, last_push = -1, svb_hits = 0, pkts = 0;

  omega_node #(.SP_LINES_P(512)) dut (.clk, .rst_n, .my_node(4'd5), .init_done, .cfg_we, .cfg_addr, .cfg_wdata,
    .iter_end, .core_req_valid, .core_req_ready, .core_req, .core_to_cache, .core_resp_valid, .core_resp_data,
    .rq_out_valid, .rq_out_ready(1'b1), .rq_out_flit, .rq_in_valid, .rq_in_ready, .rq_in_flit,
    .rs_out_valid, .rs_out_ready(1'b1), .rs_out_flit, .rs_in_valid, .rs_in_ready, .rs_in_flit,
    .push_valid, .push_ready(1'b1), .push_vid, .ev);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // other nodes: answer every read packet 4 cycles later with vid*3
  flit_t pend [$];
  int wait_c = 0;
  always @(posedge clk) if (!rst_n) rs_in_valid <= 0; else begin
    rs_in_valid <= 0;
    if (rq_out_valid) begin pend.push_back(rq_out_flit); wait_c = 4; pkts++; end
    if (wait_c > 0) wait_c--;
    else if (pend.size() > 0) begin
      flit_t f, r;
      f = pend.pop_front();
      r = '0; r.kind = PK_RESP; r.dst = f.src; r.src = f.dst; r.vid = f.vid; r.data = 64'(f.vid) * 3;
      rs_in_valid <= 1; rs_in_flit <= r;
    end
    if (push_valid) begin pushes++; last_push = int'(push_vid); end
    svb_hits += ev.svb_hit;
  end

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic req(input op_e op, input logic [47:0] a, input logic [63:0] d, input int t);
    @(negedge clk);
    core_req_valid = 1; core_req.op = op; core_req.addr = a; core_req.data = d; core_req.optype = OPT_W'(t);
    #1;
    while (!core_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    core_req_valid = 0;
  endtask
  task automatic rd(input op_e op, input logic [47:0] a, output logic [63:0] d);
    req(op, a, 0, 0);
    while (!core_resp_valid) @(negedge clk);
    d = core_resp_data;
  endtask
  task automatic settle();
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic [63:0] d;
    core_req = '0; rq_in_flit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < UCODE_DEPTH; j++) wr(CFG_UCODE + 8'(j), prog(j));
    for (int t = 0; t < 4; t++) wr(CFG_ENTRY + 8'(t), 64'(entry_of(t)));
    wr(CFG_GLOBAL + 0, 64'hFFFF_FFFF); wr(CFG_GLOBAL + 1, 1);
    // PageRank layout: next_pagerank doubles
    wr(CFG_START, 64'h8000); wr(CFG_TSIZE, 8); wr(CFG_STRIDE, 8);
    wr(CFG_NVERT, 256); wr(CFG_CHUNK, 16); wr(CFG_NPROPS, 1);
    while (!init_done) @(negedge clk);
    req(OP_WR, 48'h8000 + 85 * 8, $realtobits(0.25), 0);
    req(OP_ATOMIC, 48'h8000 + 85 * 8, $realtobits(0.125), T_PR);
    req(OP_ATOMIC, 48'h8000 + 85 * 8, $realtobits(0.125), T_PR);
    rd(OP_RD, 48'h8000 + 85 * 8, d);
    chk("PageRank sum", d, $realtobits(0.5));
    // remote read and source buffer: vertex 3 lives on node 0
    rd(OP_RD_SRC, 48'h8000 + 3 * 8, d);
    chk("remote src read", d, 9);
    rd(OP_RD_SRC, 48'h8000 + 3 * 8, d);
    chk("buffered src read", d, 9);
    chk("one packet", 64'(pkts), 1);
    chk("one buffer hit", 64'(svb_hits), 1);
    @(negedge clk); iter_end = 1; @(negedge clk); iter_end = 0;
    rd(OP_RD_SRC, 48'h8000 + 3 * 8, d);
    chk("packet after flush", 64'(pkts), 2);
    @(negedge clk);
    core_req_valid = 1; core_req.op = OP_RD; core_req.addr = 48'h8000 + 300 * 8;
    #1;
    chk("not resident: accepted at once", 64'(core_req_ready), 1);
    chk("not resident: cache path", 64'(core_to_cache), 1);
    @(negedge clk);
    core_req_valid = 0;

    // BFS layout: 4-byte parents, two Props (second unused)
    wr(CFG_TSIZE, 4); wr(CFG_STRIDE, 4);
    wr(CFG_START + 1, 64'hC000); wr(CFG_TSIZE + 1, 4); wr(CFG_STRIDE + 1, 4); wr(CFG_NPROPS, 2);
    req(OP_WR, 48'h8000 + 90 * 4, 64'hFFFF_FFFF, 0);
    req(OP_ATOMIC, 48'h8000 + 90 * 4, 64'd7, T_BFS);
    settle();
    chk("BFS push", 64'(pushes), 1);
    chk("BFS pushed vertex", 64'(last_push), 90);
    req(OP_ATOMIC, 48'h8000 + 90 * 4, 64'd8, T_BFS);
    settle();
    chk("second claim: no push", 64'(pushes), 1);
    rd(OP_RD, 48'h8000 + 90 * 4, d);
    chk("BFS parent", d, 7);
    rd(OP_RD_ACT, 48'h8000 + 90 * 4, d);
    chk("dense active bit", d, 1);

    // SSSP on vertex 91: len 50, not visited; offer 60 then -3
    req(OP_WR, 48'h8000 + 91 * 4, 64'd50, 0);
    req(OP_WR, 48'hC000 + 91 * 4, 64'd0, 0);
    req(OP_ATOMIC, 48'h8000 + 91 * 4, 64'd60, T_SSSP);
    req(OP_ATOMIC, 48'h8000 + 91 * 4, 64'hFFFF_FFFF_FFFF_FFFD, T_SSSP);
    rd(OP_RD, 48'h8000 + 91 * 4, d);
    chk("SSSP min", d, 64'hFFFF_FFFD);
    rd(OP_RD, 48'hC000 + 91 * 4, d);
    chk("SSSP visited", d, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
