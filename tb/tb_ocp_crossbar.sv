// tb_ocp_crossbar: checks the crossbar with three masters, two slaves and a
// partial connection (master 2 has no path to slave 1).
// Covers two transfers to different slaves in the same cycle, priority
// between masters contending for one slave, the missing path being ignored
// on both the request and the response side, and response routing to the
// master named by the slave side, with the master's ready returned to that
// slave only. A random phase compares every output with a model.
module tb_ocp_crossbar;
  import ocp_pkg::*;
  localparam int NM = 3, NS = 2;
  localparam logic [NM-1:0][NS-1:0] CONN = {2'b01, 2'b11, 2'b11};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NM-1:0] m_valid, m_accept;
  ocp_req_t      m_req [NM];
  logic          m_sel [NM];
  logic [NS-1:0] s_valid, s_accept, s_locked, s_held, r_valid, r_ready;
  ocp_req_t      s_req [NS];
  logic [1:0]    s_mid [NS];
  ocp_rsp_t      r_rsp [NS];
  logic [1:0]    r_mid [NS];
  logic [NS-1:0] mr_valid [NM];
  ocp_rsp_t      mr_rsp   [NM][NS];
  logic [NS-1:0] mr_ready [NM];
  int checks = 0, failures = 0;

  ocp_crossbar #(.NUM_M(NM), .NUM_S(NS), .CONNECT(CONN)) dut (.*);

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  function automatic ocp_req_t mk(int a);
    ocp_req_t r = '0;
    r.cmd = CMD_RD; r.addr = 32'(a); r.burst_len = 1; r.req_last = 1;
    return r;
  endfunction

  initial begin
    m_valid = '0; s_accept = '1; r_valid = '0;
    for (int m = 0; m < NM; m++) begin m_req[m] = mk(m); m_sel[m] = 0; mr_ready[m] = '0; end
    for (int s = 0; s < NS; s++) begin r_rsp[s] = '0; r_mid[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // parallel: master 1 -> slave 0 and master 0 -> slave 1
    m_valid = 3'b011; m_sel[0] = 1; m_sel[1] = 0; #1;
    expect_eq(m_accept, 3'b011, "two masters served in the same cycle");
    expect_eq(s_mid[0], 1, "slave 0 serves master 1");
    expect_eq(s_mid[1], 0, "slave 1 serves master 0");
    expect_eq(s_req[1].addr, 0, "master 0 request at slave 1");
    // contention for slave 0: master 1 wins over master 2
    m_valid = 3'b110; m_sel[1] = 0; m_sel[2] = 0; #1;
    expect_eq(m_accept, 3'b010, "priority on contention");
    expect_eq(s_req[0].addr, 1, "winner's request at slave 0");
    // slave 0 busy: nobody accepted
    s_accept = 2'b10; #1;
    expect_eq(m_accept, 3'b000, "slave not accepting");
    expect_eq(s_valid[0], 1, "request still offered");
    s_accept = '1;
    // missing path: master 2 to slave 1 is never offered
    m_valid = 3'b100; m_sel[2] = 1; #1;
    expect_eq(s_valid[1], 0, "no path from master 2 to slave 1");
    expect_eq(m_accept, 0, "no accept on a missing path");
    m_valid = '0;
    // responses: slave 0 -> master 2, slave 1 -> master 2 (no path)
    r_valid = 2'b11; r_mid[0] = 2; r_mid[1] = 2;
    r_rsp[0] = '{resp: RESP_DVA, data: 32'hAB, tag: 2'd1, resp_last: 1'b1};
    mr_ready[2] = 2'b11; #1;
    expect_eq(mr_valid[2], 2'b01, "response routed, missing path dropped");
    expect_eq(mr_rsp[2][0].data, 32'hAB, "response data");
    expect_eq(mr_valid[0] | mr_valid[1], 0, "other masters see nothing");
    expect_eq(r_ready, 2'b01, "ready back to slave 0 only");
    mr_ready[2] = 2'b00; mr_ready[0] = 2'b11; #1;
    expect_eq(r_ready, 2'b00, "another master's ready is ignored");
    r_valid = '0;
    // random phase against a model
    for (int i = 0; i < 3000; i++) begin
      logic [NM-1:0] want_acc;
      logic [NS-1:0] want_rdy;
      @(negedge clk);
      m_valid = NM'($urandom);
      for (int m = 0; m < NM; m++) begin m_sel[m] = 1'($urandom); mr_ready[m] = NS'($urandom); end
      s_accept = NS'($urandom);
      r_valid = NS'($urandom);
      for (int s = 0; s < NS; s++) r_mid[s] = 2'($urandom % NM);
      #1;
      want_acc = '0;
      for (int s = 0; s < NS; s++)
        for (int m = 0; m < NM; m++)
          if (m_valid[m] && m_sel[m] == 1'(s) && CONN[m][s]) begin
            if (s_accept[s]) want_acc[m] = 1'b1;
            break;
          end
      want_rdy = '0;
      for (int s = 0; s < NS; s++)
        if (r_valid[s] && CONN[r_mid[s]][s] && mr_ready[r_mid[s]][s]) want_rdy[s] = 1'b1;
      expect_eq(m_accept, want_acc, "random accept");
      expect_eq(r_ready, want_rdy, "random ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
