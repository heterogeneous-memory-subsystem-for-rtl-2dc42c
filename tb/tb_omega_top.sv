// tb_omega_top: end-to-end run of the full 16-node subsystem at its default
// size (1 MB scratchpad per node) on a small power-law graph.
//
// The testbench generates a 512-vertex, 1500-edge graph whose destinations
// are skewed towards low vertex IDs (as after in-degree reordering), and maps
// the first 128 vertices (25 %) to the scratchpads, interleaved in chunks of
// 4. Sixteen core models, one per node, then run three kernels through the
// nodes' core ports, with the edges dealt out round-robin to the cores:
//   1. PageRank scatter: one offloaded fp-add atomic per edge. Destinations
//      outside the scratchpads come back flagged for the cache path and are
//      accumulated by the core model. Every next_pagerank is read back
//      through some node (mostly remote) and compared with the sums.
//   2. SSSP (Bellman-Ford by frontier): source lengths are read with source
//      reads (buffered per iteration, flushed by iter_end), relaxations are
//      offloaded signed-min atomics, the next frontier is collected from the
//      dense active bits with read-and-clear. Final lengths are compared with
//      a reference shortest-path computation.
//   3. BFS: offloaded parent claims; the next frontier is what the PISCs push
//      to the sparse active lists. Each level is compared with a reference
//      BFS and every parent must be a previous-level neighbour.
//   4. Buffer staleness: a remote source value that changes is still served
//      from the node's buffer within the iteration and fetched anew after
//      iter_end.
// Graph shape, sizes and kernels are this testbench's choices; the kernels'
// update rules (fp add, min, parent claim, active lists) follow the design.
// Timing is not checked here (the block testbenches do that); a watchdog
// ends the run if any core model hangs.
// Every mechanism is counted (cache path, local / remote / served accesses,
// buffer hits and fills, atomics, held-back requests, sparse pushes, dense
// active bits, buffer flushes) and one that never occurs is a failure.
module tb_omega_top;
  import omega_pkg::*;
  import omega_tb_pkg::*;
  localparam int N = NUM_NODES;
  localparam int V = 512, NV = 128, E = 1500, CH = 4;

  logic clk = 0, rst_n = 0, init_done;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0;
  logic iter_end = 0;
  logic      [N-1:0] core_req_valid, core_req_ready, core_to_cache, core_resp_valid;
  core_req_t [N-1:0] core_req;
  logic      [N-1:0][DATA_W-1:0] core_resp_data;
  logic      [N-1:0] push_valid;
  logic      [N-1:0][VID_W-1:0] push_vid;
  ev_t       [N-1:0] ev;

  omega_top dut (.clk, .rst_n, .init_done, .cfg_we, .cfg_addr, .cfg_wdata, .iter_end,
                 .core_req_valid, .core_req_ready, .core_req, .core_to_cache,
                 .core_resp_valid, .core_resp_data, .push_valid, .push_ready('1), .push_vid, .ev);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ event counters
  int c_cache = 0, c_local = 0, c_remote = 0, c_served = 0, c_hit = 0, c_fill = 0;
  int c_atomic = 0, c_block = 0, c_push = 0, c_act = 0, c_flush = 0;
  bit busy_seen;
  bit pushed [V];
  always @(posedge clk) if (rst_n) begin
    busy_seen = 0;
    for (int n = 0; n < N; n++) begin
      c_cache  += ev[n].to_cache;
      c_local  += ev[n].local_acc;
      c_remote += ev[n].remote_acc;
      c_served += ev[n].served_remote;
      c_hit    += ev[n].svb_hit;
      c_fill   += ev[n].svb_fill;
      c_atomic += ev[n].atomic;
      c_block  += ev[n].block;
      if (ev[n] != '0) busy_seen = 1;
      if (push_valid[n]) begin
        c_push++;
        if (int'(push_vid[n]) < V) pushed[push_vid[n]] = 1;
      end
    end
    c_flush += iter_end;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // one core request from node n; reads wait for their reply
  task automatic creq(input int n, input op_e op, input logic [47:0] a, input logic [63:0] d,
                      input int t, output bit tc, output logic [63:0] rdata);
    @(negedge clk);
    core_req_valid[n] = 1;
    core_req[n].op = op; core_req[n].addr = a; core_req[n].data = d; core_req[n].optype = OPT_W'(t);
    #1;
    while (!core_req_ready[n]) begin @(negedge clk); #1; end
    tc = core_to_cache[n];
    @(negedge clk);
    core_req_valid[n] = 0;
    rdata = '0;
    if (!tc && op != OP_WR && op != OP_ATOMIC) begin
      while (!core_resp_valid[n]) @(negedge clk);
      rdata = core_resp_data[n];
    end
  endtask

  // wait until no node has shown activity for a while
  task automatic quiesce();
    int idle;
    idle = 0;
    while (idle < 60) begin
      @(negedge clk);
      idle = busy_seen ? 0 : idle + 1;
    end
  endtask

  task automatic pulse_iter_end();
    @(negedge clk); iter_end = 1; @(negedge clk); iter_end = 0;
  endtask

  // ----------------------------------------------------------------- graph
  int es [E], ed [E], ew [E];

  function automatic logic [47:0] A(input logic [47:0] base, input int stride, input int v);
    return base + 48'(stride * v);
  endfunction

  initial begin
    bit tc;
    logic [63:0] d;
    core_req_valid = '0; core_req = '0;
    foreach (pushed[v]) pushed[v] = 0;
    for (int e = 0; e < E; e++) begin
      real u;
      u = real'($urandom_range(0, 99999)) / 100000.0;
      es[e] = $urandom_range(0, V - 1);
      ed[e] = int'($floor(real'(V) * u * u * u));
      ew[e] = e % 9 + 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < UCODE_DEPTH; j++) wr(CFG_UCODE + 8'(j), prog(j));
    for (int t = 0; t < 4; t++) wr(CFG_ENTRY + 8'(t), 64'(entry_of(t)));
    wr(CFG_GLOBAL + 0, 64'hFFFF_FFFF); wr(CFG_GLOBAL + 1, 1);
    wr(CFG_NVERT, NV); wr(CFG_CHUNK, CH);
    while (!init_done) @(negedge clk);
    $display("scratchpads cleared after %0d cycles", cyc);

    // ======================================================= 1. PageRank
    begin
      real exp_pr [V];
      real cache_pr [V];
      foreach (exp_pr[v]) begin exp_pr[v] = 0.0; cache_pr[v] = 0.0; end
      for (int e = 0; e < E; e++) exp_pr[ed[e]] += real'(es[e] % 5 + 1);
      wr(CFG_START, 64'h1000_0000); wr(CFG_TSIZE, 8); wr(CFG_STRIDE, 8); wr(CFG_NPROPS, 1);
      for (int n = 0; n < N; n++) begin
        fork
          automatic int nn = n;
          begin
            automatic bit t1; automatic logic [63:0] r1;
            for (int e = nn; e < E; e += N) begin
              creq(nn, OP_ATOMIC, A(48'h1000_0000, 8, ed[e]), $realtobits(real'(es[e] % 5 + 1)), T_PR, t1, r1);
              if (t1) cache_pr[ed[e]] += real'(es[e] % 5 + 1);
            end
          end
        join_none
      end
      wait fork;
      quiesce();
      $display("PageRank scatter done at cycle %0d", cyc);
      for (int n = 0; n < N; n++) begin
        fork
          automatic int nn = n;
          begin
            automatic bit t1; automatic logic [63:0] r1;
            for (int v = nn; v < V; v += N) begin
              creq(nn, OP_RD, A(48'h1000_0000, 8, v), 0, 0, t1, r1);
              chk($sformatf("pr cache path v%0d", v), 64'(t1), 64'(v >= NV));
              if (v < NV) chk($sformatf("pr v%0d", v), r1, $realtobits(exp_pr[v]));
              else        chk($sformatf("pr cached v%0d", v), $realtobits(cache_pr[v]), $realtobits(exp_pr[v]));
            end
          end
        join_none
      end
      wait fork;
    end

    // =========================================================== 2. SSSP
    begin
      int ref_d [NV];
      bit front [NV];
      bit any;
      int rounds;
      for (int v = 0; v < NV; v++) ref_d[v] = (v == 0) ? 0 : 32'h7FFF_FFFF;
      for (int it = 0; it < NV; it++)
        for (int e = 0; e < E; e++)
          if (es[e] < NV && ed[e] < NV && ref_d[es[e]] != 32'h7FFF_FFFF && ref_d[es[e]] + ew[e] < ref_d[ed[e]])
            ref_d[ed[e]] = ref_d[es[e]] + ew[e];
      wr(CFG_START, 64'h2000_0000); wr(CFG_TSIZE, 4); wr(CFG_STRIDE, 4);
      wr(CFG_START + 1, 64'h3000_0000); wr(CFG_TSIZE + 1, 4); wr(CFG_STRIDE + 1, 4);
      wr(CFG_NPROPS, 2);
      for (int v = 0; v < NV; v++) begin
        creq(v % N, OP_WR, A(48'h2000_0000, 4, v), (v == 0) ? 64'd0 : 64'h7FFF_FFFF, 0, tc, d);
        creq(v % N, OP_WR, A(48'h3000_0000, 4, v), 64'd0, 0, tc, d);
        front[v] = (v == 0);
      end
      rounds = 0;
      any = 1;
      while (any && rounds < 40) begin
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int e = nn; e < E; e += N) begin
                if (es[e] < NV && ed[e] < NV && front[es[e]]) begin
                  creq(nn, OP_RD_SRC, A(48'h2000_0000, 4, es[e]), 0, 0, t1, r1);
                  creq(nn, OP_ATOMIC, A(48'h2000_0000, 4, ed[e]),
                       64'($signed(r1[31:0]) + ew[e]), T_SSSP, t1, r1);
                end
              end
            end
          join_none
        end
        wait fork;
        quiesce();
        pulse_iter_end();
        any = 0;
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int v = nn; v < NV; v += N) begin
                creq(nn, OP_RD_ACT, A(48'h2000_0000, 4, v), 0, 0, t1, r1);
                front[v] = r1[0];
                if (r1[0]) begin any = 1; c_act++; end
                creq(nn, OP_WR, A(48'h3000_0000, 4, v), 64'd0, 0, t1, r1);
              end
            end
          join_none
        end
        wait fork;
        rounds++;
      end
      $display("SSSP converged after %0d rounds at cycle %0d", rounds, cyc);
      chk("SSSP converged", 64'(any), 0);
      for (int v = 0; v < NV; v++) begin
        creq(v % N, OP_RD, A(48'h2000_0000, 4, v), 0, 0, tc, d);
        chk($sformatf("sssp v%0d", v), 64'(d[31:0]), 64'(ref_d[v]));
      end
    end

    // ============================================================ 3. BFS
    begin
      int lvl [NV];
      bit front [NV];
      int level, nfront;
      for (int v = 0; v < NV; v++) begin lvl[v] = (v == 0) ? 0 : -1; front[v] = (v == 0); end
      wr(CFG_START, 64'h4000_0000); wr(CFG_TSIZE, 4); wr(CFG_STRIDE, 4); wr(CFG_NPROPS, 1);
      for (int v = 0; v < NV; v++)
        creq(v % N, OP_WR, A(48'h4000_0000, 4, v), (v == 0) ? 64'd0 : 64'hFFFF_FFFF, 0, tc, d);
      repeat (20) @(negedge clk);
      level = 0;
      nfront = 1;
      while (nfront > 0) begin
        bit exp_next [NV];
        foreach (exp_next[v]) exp_next[v] = 0;
        for (int e = 0; e < E; e++)
          if (es[e] < NV && ed[e] < NV && front[es[e]] && lvl[ed[e]] < 0) exp_next[ed[e]] = 1;
        foreach (pushed[v]) pushed[v] = 0;
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int e = nn; e < E; e += N)
                if (es[e] < NV && ed[e] < NV && front[es[e]])
                  creq(nn, OP_ATOMIC, A(48'h4000_0000, 4, ed[e]), 64'(es[e]), T_BFS, t1, r1);
            end
          join_none
        end
        wait fork;
        quiesce();
        level++;
        nfront = 0;
        for (int v = 0; v < NV; v++) begin
          chk($sformatf("bfs level %0d v%0d", level, v), 64'(pushed[v]), 64'(exp_next[v]));
          front[v] = exp_next[v];
          if (exp_next[v]) begin lvl[v] = level; nfront++; end
        end
      end
      $display("BFS done, %0d levels, at cycle %0d", level, cyc);
      for (int v = 1; v < NV; v++) begin
        creq(v % N, OP_RD, A(48'h4000_0000, 4, v), 0, 0, tc, d);
        if (lvl[v] < 0) chk($sformatf("bfs unreached v%0d", v), d, 64'hFFFF_FFFF);
        else begin
          bit ok;
          ok = 0;
          for (int e = 0; e < E; e++)
            if (es[e] == int'(d[31:0]) && ed[e] == v && lvl[es[e]] == lvl[v] - 1) ok = 1;
          chk($sformatf("bfs parent of v%0d", v), 64'(ok), 1);
        end
      end
    end

    // ================================================ 4. buffer staleness
    // Node 0 reads vertex 5 (home node 1) as a source: the copy it keeps is
    // served again within the iteration even after the home value changed,
    // and the flush at iter_end makes the next read fetch the new value.
    begin
      automatic bit t1; automatic logic [63:0] r1;
      creq(1, OP_WR, A(48'h4000_0000, 4, 5), 64'd111, 0, t1, r1);
      repeat (10) @(negedge clk);
      creq(0, OP_RD_SRC, A(48'h4000_0000, 4, 5), 0, 0, t1, r1);
      chk("src read first",           r1[31:0], 111);
      creq(1, OP_WR, A(48'h4000_0000, 4, 5), 64'd222, 0, t1, r1);
      repeat (10) @(negedge clk);
      creq(0, OP_RD_SRC, A(48'h4000_0000, 4, 5), 0, 0, t1, r1);
      chk("src read buffered copy",   r1[31:0], 111);
      pulse_iter_end();
      creq(0, OP_RD_SRC, A(48'h4000_0000, 4, 5), 0, 0, t1, r1);
      chk("src read after flush",     r1[31:0], 222);
    end

    $display("events: cache %0d local %0d remote %0d served %0d svb_hit %0d svb_fill %0d atomic %0d block %0d push %0d active %0d flush %0d",
             c_cache, c_local, c_remote, c_served, c_hit, c_fill, c_atomic, c_block, c_push, c_act, c_flush);
    chk("cache path used",      64'(c_cache  > 0), 1);
    chk("local access",         64'(c_local  > 0), 1);
    chk("remote access",        64'(c_remote > 0), 1);
    chk("served for others",    64'(c_served > 0), 1);
    chk("buffer hit",           64'(c_hit    > 0), 1);
    chk("buffer fill",          64'(c_fill   > 0), 1);
    chk("atomics",              64'(c_atomic > 0), 1);
    chk("held-back requests",   64'(c_block  > 0), 1);
    chk("sparse pushes",        64'(c_push   > 0), 1);
    chk("dense active bits",    64'(c_act    > 0), 1);
    chk("buffer flushes",       64'(c_flush  > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
