// tb_ocp_fsm_s: checks the master-side wrapper, with the testbench playing
// both the initiator and the crossbar.
// Covers forwarding of legal requests with the decoded slave and
// SCmdAccept following the crossbar's accept, a multi-request burst whose
// later beats stay on the first beat's slave, the ordering stall (same tag,
// other slave) and its release when the response arrives, and ERR responses
// from the wrapper itself for an illegal single request (one) and an
// illegal single-request read burst (one per beat, SRespLast on the last).
module tb_ocp_fsm_s;
  import ocp_pkg::*;
  localparam int NS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ocp_req_t        m_req, bus_req;
  logic            m_cmd_accept, m_resp_accept, bus_valid, bus_accept, idle;
  ocp_rsp_t        m_rsp;
  logic            bus_sel;
  logic [NS-1:0]   src_valid, src_ready;
  ocp_rsp_t        src_rsp [NS];
  int checks = 0, failures = 0;

  ocp_fsm_s #(.NUM_S(NS), .REGION_LSB(28), .SLAVE_SPAN(12), .MAX_OUT(8)) dut (.*);

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  function automatic ocp_req_t mk(ocp_cmd_e c, logic [31:0] a, int tag);
    ocp_req_t r = '0;
    r.cmd = c; r.addr = a; r.burst_len = 1; r.req_last = 1; r.tag = TAG_W'(tag);
    r.data = a ^ 32'h1234;
    return r;
  endfunction

  task automatic tick();
    @(posedge clk); #1;
  endtask

  ocp_req_t r;

  initial begin
    m_req = '0; m_resp_accept = 0; bus_accept = 0; src_valid = '0;
    for (int i = 0; i < NS; i++) src_rsp[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // legal write to slave 1, crossbar busy for one cycle
    m_req = mk(CMD_WR, 32'h1000_0010, 0); #1;
    expect_eq(bus_valid, 1, "legal request forwarded");
    expect_eq(bus_sel, 1, "decoded to slave 1");
    expect_eq(bus_req.addr, 32'h1000_0010, "request passed");
    expect_eq(m_cmd_accept, 0, "no accept before the crossbar");
    tick();
    bus_accept = 1; #1;
    expect_eq(m_cmd_accept, 1, "accept follows the crossbar");
    tick();
    bus_accept = 0;
    // same tag to slave 0: ordering stall
    m_req = mk(CMD_RD, 32'h0000_0020, 0); #1;
    expect_eq(bus_valid, 0, "same tag, other slave: held back");
    expect_eq(m_cmd_accept, 0, "held back, not accepted");
    // the owed response from slave 1 arrives and frees the tag
    src_valid[1] = 1;
    src_rsp[1] = '{resp: RESP_DVA, data: 32'h0, tag: 2'd0, resp_last: 1'b1};
    m_resp_accept = 1; #1;
    expect_eq(m_rsp.resp, RESP_DVA, "response passed to the initiator");
    expect_eq(src_ready, 2'b10, "ready to slave 1");
    tick();
    src_valid = '0; #1;
    expect_eq(bus_valid, 1, "released after the response");
    expect_eq(bus_sel, 0, "now to slave 0");
    bus_accept = 1;
    tick();
    // multi-request burst: second beat decodes elsewhere but stays on slave 0
    r = mk(CMD_WR, 32'h0000_0100, 1);
    r.burst_len = 2; r.req_last = 0;
    m_req = r; #1;
    expect_eq(bus_sel, 0, "burst beat 1 to slave 0");
    tick();
    r.addr = 32'h1000_0104; r.req_last = 1;
    m_req = r; #1;
    expect_eq(bus_sel, 0, "burst beat 2 kept on slave 0");
    expect_eq(bus_valid, 1, "burst beat 2 forwarded");
    tick();
    bus_accept = 0;
    // illegal single read: answered locally, tag 3
    m_req = mk(CMD_RD, 32'h0000_2000, 3); #1;
    expect_eq(bus_valid, 0, "illegal request not forwarded");
    expect_eq(m_cmd_accept, 1, "illegal request accepted");
    tick();
    m_req = '0; m_resp_accept = 0; #1;
    expect_eq(m_rsp.resp, RESP_ERR, "error response");
    expect_eq(m_rsp.tag, 3, "error response tag");
    expect_eq(m_rsp.resp_last, 1, "single error response is last");
    tick();
    expect_eq(m_rsp.resp, RESP_ERR, "error response held");
    m_resp_accept = 1;
    tick();
    expect_eq(m_rsp.resp, RESP_NULL, "one error response only");
    // illegal single-request burst read to a nonexistent slave: 3 responses
    r = mk(CMD_RD, 32'h3000_0000, 2);
    r.single_req = 1; r.burst_len = 3;
    m_req = r;
    tick();
    m_req = '0;
    for (int i = 0; i < 3; i++) begin
      expect_eq(m_rsp.resp, RESP_ERR, "burst error beat");
      expect_eq(m_rsp.resp_last, i == 2, "burst error last flag");
      tick();
    end
    expect_eq(m_rsp.resp, RESP_NULL, "burst errors done");
    // responses owed: slave 0 owes tag0 (read) and tag1 (2 writes)
    expect_eq(idle, 0, "responses still owed");
    src_valid[0] = 1;
    src_rsp[0] = '{resp: RESP_DVA, data: 32'h55, tag: 2'd0, resp_last: 1'b1};
    tick();
    src_rsp[0].tag = 2'd1; src_rsp[0].resp_last = 0;
    tick();
    src_rsp[0].resp_last = 1;
    tick();
    src_valid = '0; #1;
    expect_eq(idle, 1, "all responses delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
