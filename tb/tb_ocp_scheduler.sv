// tb_ocp_scheduler: checks the per-master ordering scheduler.
// Issue rule: a tag whose responses are owed by one source is refused for
// another source, accepted again for the same one, and refused once MAX_OUT
// responses are owed. Return side: with two sources offering responses the
// scheduler shows one, holds it unchanged while the master withholds
// MRespAccept, alternates sources round-robin, and frees a tag for another
// source once all its responses were delivered. A random phase then checks
// the owed counts against a model of the rule.
module tb_ocp_scheduler;
  import ocp_pkg::*;
  localparam int NS = 2, NSRC = NS + 1, MAXO = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             iss_valid, iss_ok, iss_fire, m_resp_accept, idle;
  logic [TAG_W-1:0] iss_tag;
  logic [1:0]       iss_src;
  logic [BLEN_W:0]  iss_cnt;
  logic [NSRC-1:0]  src_valid, src_ready;
  ocp_rsp_t         src_rsp [NSRC];
  ocp_rsp_t         m_rsp;
  int checks = 0, failures = 0;

  ocp_scheduler #(.NUM_S(NS), .MAX_OUT(MAXO)) dut (.*);

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // ask permission at negedge; optionally issue at the next posedge
  task automatic ask(int tag, int src, int cnt, logic want, logic fire, string what);
    @(negedge clk);
    iss_valid = 1; iss_tag = TAG_W'(tag); iss_src = 2'(src); iss_cnt = (BLEN_W+1)'(cnt);
    #1;
    expect_eq(iss_ok, want, what);
    iss_fire = fire && iss_ok;
    @(posedge clk); #1;
    iss_valid = 0; iss_fire = 0;
  endtask

  function automatic ocp_rsp_t mkr(int tag, int d);
    ocp_rsp_t r = '0;
    r.resp = RESP_DVA; r.tag = TAG_W'(tag); r.data = 32'(d); r.resp_last = 1;
    return r;
  endfunction

  int model_owed [NTAGS];
  int model_src  [NTAGS];

  initial begin
    iss_valid = 0; iss_fire = 0; iss_tag = 0; iss_src = 0; iss_cnt = 1;
    src_valid = '0; m_resp_accept = 0;
    for (int i = 0; i < NSRC; i++) src_rsp[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_eq(idle, 1, "idle after reset");
    // issue rule
    ask(0, 1, 1, 1, 1, "tag0 -> src1");
    expect_eq(idle, 0, "not idle with a response owed");
    ask(0, 0, 1, 0, 0, "tag0 -> src0 refused");
    ask(0, 2, 1, 0, 0, "tag0 -> error src refused");
    ask(0, 1, 2, 1, 1, "tag0 -> src1 again");
    ask(0, 1, 2, 0, 0, "tag0 over MAX_OUT refused");
    ask(1, 0, 1, 1, 1, "tag1 -> src0");
    ask(2, 2, 4, 1, 1, "tag2 -> error src, 4 owed");
    // return side: src0 (tag1) and src1 (tag0) both offer
    @(negedge clk);
    src_valid = 3'b011;
    src_rsp[0] = mkr(1, 100);
    src_rsp[1] = mkr(0, 200);
    m_resp_accept = 0;
    #1;
    begin
      int first;
      first = int'(m_rsp.data);
      expect_eq(m_rsp.resp, RESP_DVA, "response shown");
      repeat (3) begin
        @(posedge clk); #1;
        expect_eq(m_rsp.data, first, "held while not accepted");
        expect_eq(src_ready, 0, "no ready while not accepted");
      end
      @(negedge clk);
      m_resp_accept = 1;
      #1;
      expect_eq(src_ready, first == 100 ? 3'b001 : 3'b010, "ready to shown source");
      @(posedge clk); #1;
      // the accepted source withdraws its response
      if (first == 100) src_valid[0] = 0; else src_valid[1] = 0;
      #1;
      expect_eq(m_rsp.data, first == 100 ? 200 : 100, "other source next");
      @(posedge clk); #1;
      src_valid = '0;
    end
    // owed now: tag0 = 2 (src1), tag1 = 0, tag2 = 4
    ask(1, 1, 1, 1, 0, "tag1 free for any source");
    ask(0, 0, 1, 0, 0, "tag0 still bound to src1");
    // drain tag0 from src1 and the four error responses, round robin
    @(negedge clk);
    src_valid = 3'b110;
    src_rsp[1] = mkr(0, 1);
    src_rsp[2] = mkr(2, 2);
    m_resp_accept = 1;
    begin
      int n1, n2, last;
      n1 = 0; n2 = 0; last = -1;
      for (int i = 0; i < 6; i++) begin
        #1;
        if (src_ready[1]) n1++;
        if (src_ready[2]) n2++;
        if (i > 0 && i < 4) expect_eq(src_ready[1] ? 1 : 2, last == 1 ? 2 : 1, "round robin");
        last = src_ready[1] ? 1 : 2;
        @(posedge clk); #1;
        if (n1 == 2) src_valid[1] = 0;
        if (n2 == 4) src_valid[2] = 0;
      end
      expect_eq(n1, 2, "tag0 drained");
      expect_eq(n2, 4, "error responses drained");
    end
    @(negedge clk); src_valid = '0; #1;
    expect_eq(idle, 1, "idle after draining");
    ask(0, 0, 1, 1, 0, "tag0 free again");
    // random phase against a model of the issue rule
    for (int t = 0; t < NTAGS; t++) begin model_owed[t] = 0; model_src[t] = 0; end
    for (int i = 0; i < 2000; i++) begin
      int tg, sr, cn;
      logic w;
      tg = $urandom % NTAGS; sr = $urandom % NSRC; cn = 1 + $urandom % 2;
      w = (model_owed[tg] == 0 || model_src[tg] == sr) && (model_owed[tg] + cn <= MAXO);
      @(negedge clk);
      src_valid = '0;
      iss_valid = 1; iss_tag = TAG_W'(tg); iss_src = 2'(sr); iss_cnt = (BLEN_W+1)'(cn);
      // offer one response for a random owed tag from its source
      begin
        int rt;
        rt = $urandom % NTAGS;
        if (model_owed[rt] > 0 && !(rt == tg && w)) begin
          src_valid[model_src[rt]] = 1;
          src_rsp[model_src[rt]] = mkr(rt, i);
        end
      end
      m_resp_accept = 1;
      #1;
      expect_eq(iss_ok, w, "random issue rule");
      iss_fire = iss_ok;
      for (int k = 0; k < NSRC; k++)
        if (src_ready[k]) model_owed[int'(src_rsp[k].tag)]--;
      if (iss_fire) begin model_owed[tg] += cn; model_src[tg] = sr; end
      @(posedge clk); #1;
      iss_fire = 0; iss_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
