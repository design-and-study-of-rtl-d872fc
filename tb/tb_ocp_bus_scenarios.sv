// tb_ocp_bus_scenarios: directed walk-through of the bus's transaction types
// at the default size, with exact cycle counts.
// Targets answer without stalls, target 0 after 1 cycle and target 1 after
// 8 cycles. The expected timings follow from the bus's timing: a request
// accepted from the initiator at edge k is shown to the target after edge k,
// the target accepts it at edge k+1 and shows its response LATENCY cycles
// later, and the initiator takes that response at edge k+2+LATENCY (the bus
// adds one cycle, the request register, to the target's own latency).
// Scenarios:
//   simple      write then read of one word, each answered 2+LATENCY edges
//               after acceptance;
//   burst       4-beat multi-request write burst accepted on 4 consecutive
//               edges, then a 4-beat single-request read burst returning the
//               data on 4 consecutive edges, SRespLast on the last;
//   out-of-order read of the slow target (tag 0) then of the fast one
//               (tag 1): the tag 1 response arrives first;
//   pipelined   4 reads of the slow target accepted on consecutive edges
//               before the first response, all done 5+LATENCY edges after
//               the first acceptance instead of at least 4*(2+LATENCY) one at
//               a time;
//   parallel    both initiators accepted in the same cycle by different
//               targets;
//   lock        initiator 1 locks target 0 with RDEX; initiator 0, though of
//               higher priority, is only accepted after initiator 1's write;
//   error       a read of a nonexistent target answered with ERR.
module tb_ocp_bus_scenarios;
  import ocp_pkg::*;

  localparam int NM = 2, NS = 2, L0 = 1, L1 = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ocp_req_t         m_req [NM];
  logic [NM-1:0]    m_cmd_accept, m_resp_accept, m_idle;
  ocp_rsp_t         m_rsp [NM];
  ocp_req_t         s_req [NS];
  logic [NS-1:0]    s_cmd_accept, s_resp_accept, s_locked, s_held;
  ocp_rsp_t         s_rsp [NS];

  ocp_bus dut (.*);

  ocp_mem_model #(.ID(0), .LATENCY(L0), .STALL_PCT(0)) u_t0 (
    .clk, .rst_n, .req(s_req[0]), .cmd_accept(s_cmd_accept[0]),
    .rsp(s_rsp[0]), .resp_accept(s_resp_accept[0]));
  ocp_mem_model #(.ID(1), .LATENCY(L1), .STALL_PCT(0)) u_t1 (
    .clk, .rst_n, .req(s_req[1]), .cmd_accept(s_cmd_accept[1]),
    .rsp(s_rsp[1]), .resp_accept(s_resp_accept[1]));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // responses seen per initiator, with the edge they were taken on
  typedef struct { ocp_rsp_t r; int at; } seen_t;
  seen_t seen [NM][$];
  for (genvar m = 0; m < NM; m++) begin : g_mon
    always @(posedge clk)
      if (rst_n && m_rsp[m].resp != RESP_NULL && m_resp_accept[m])
        seen[m].push_back('{r: m_rsp[m], at: cyc});
  end

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  function automatic ocp_req_t mk(ocp_cmd_e c, logic [31:0] a, int tag, logic [31:0] d = 0);
    ocp_req_t r = '0;
    r.cmd = c; r.addr = a; r.tag = TAG_W'(tag); r.data = d;
    r.burst_len = 1; r.req_last = 1;
    return r;
  endfunction

  // show a request and return the edge on which it was accepted
  task automatic send(int m, ocp_req_t r, output int at);
    @(negedge clk);
    m_req[m] = r;
    do @(posedge clk); while (!m_cmd_accept[m]);
    at = cyc;
    @(negedge clk);
    m_req[m] = '0;
  endtask

  // show several requests back to back, recording each acceptance edge
  task automatic send_seq(int m, ocp_req_t rs [$], output int ats [$]);
    ats = {};
    foreach (rs[i]) begin
      @(negedge clk);
      m_req[m] = rs[i];
      do @(posedge clk); while (!m_cmd_accept[m]);
      ats.push_back(cyc);
    end
    @(negedge clk);
    m_req[m] = '0;
  endtask

  task automatic wait_rsp(int m, int n);
    while (seen[m].size() < n) @(posedge clk);
    #1;
  endtask

  localparam logic [31:0] T0 = 32'h0000_0000, T1 = 32'h1000_0000;

  initial begin
    int t_a, t_b;
    int ats [$];
    ocp_req_t rs [$];
    ocp_req_t r;
    seen_t s;
    for (int m = 0; m < NM; m++) m_req[m] = '0;
    m_resp_accept = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // simple: write then read target 1
    send(0, mk(CMD_WR, T1 + 32'h40, 0, 32'hCAFE_0001), t_a);
    wait_rsp(0, 1);
    s = seen[0].pop_front();
    expect_eq(s.r.resp, RESP_DVA, "simple write acknowledged");
    expect_eq(s.at - t_a, 2 + L1, "simple write latency");
    send(0, mk(CMD_RD, T1 + 32'h40, 0), t_a);
    wait_rsp(0, 1);
    s = seen[0].pop_front();
    expect_eq(s.r.data, 32'hCAFE_0001, "simple read data");
    expect_eq(s.at - t_a, 2 + L1, "simple read latency");

    // burst: 4-beat multi-request write to target 0, one beat per cycle
    rs = {};
    for (int b = 0; b < 4; b++) begin
      r = mk(CMD_WR, T0 + 32'h100 + 32'(4 * b), 1, 32'hB000 + 32'(b));
      r.burst_len = 4; r.req_last = (b == 3);
      rs.push_back(r);
    end
    send_seq(0, rs, ats);
    expect_eq(ats[3] - ats[0], 3, "burst beats on consecutive edges");
    wait_rsp(0, 4);
    for (int b = 0; b < 4; b++) begin
      s = seen[0].pop_front();
      expect_eq(s.r.resp_last, b == 3, "write burst response last flag");
    end
    // single-request read burst of the same four words
    r = mk(CMD_RD, T0 + 32'h100, 2);
    r.single_req = 1; r.burst_len = 4;
    send(0, r, t_a);
    wait_rsp(0, 4);
    for (int b = 0; b < 4; b++) begin
      s = seen[0].pop_front();
      expect_eq(s.r.data, 32'hB000 + b, "read burst data");
      expect_eq(s.r.resp_last, b == 3, "read burst last flag");
      expect_eq(s.at - t_a, 2 + L0 + b, "read burst beat timing");
    end

    // out-of-order: slow target first with tag 0, fast target with tag 1
    rs = {mk(CMD_RD, T1 + 32'h40, 0), mk(CMD_RD, T0 + 32'h100, 1)};
    send_seq(0, rs, ats);
    wait_rsp(0, 2);
    s = seen[0].pop_front();
    expect_eq(s.r.tag, 1, "fast target's response overtakes");
    expect_eq(s.r.data, 32'hB000, "fast response data");
    s = seen[0].pop_front();
    expect_eq(s.r.tag, 0, "slow target's response second");
    expect_eq(s.r.data, 32'hCAFE_0001, "slow response data");

    // pipelined: 4 reads of the slow target, same tag
    rs = {};
    for (int i = 0; i < 4; i++) rs.push_back(mk(CMD_RD, T1 + 32'h40, 3));
    send_seq(0, rs, ats);
    expect_eq(ats[3] - ats[0], 3, "pipelined requests on consecutive edges");
    wait_rsp(0, 4);
    expect_eq(seen[0][0].at > ats[3], 1, "all four issued before the first response");
    expect_eq(seen[0][3].at - ats[0], 5 + L1, "pipelined total time");
    checks++;
    if (seen[0][3].at - ats[0] >= 4 * (2 + L1)) begin
      failures++; $display("FAIL pipelining gave no gain");
    end
    seen[0].delete();

    // parallel: initiator 0 to target 0 and initiator 1 to target 1 together
    fork
      send(0, mk(CMD_RD, T0 + 32'h104, 0), t_a);
      send(1, mk(CMD_RD, T1 + 32'h8040, 0), t_b);
    join
    expect_eq(t_a, t_b, "both initiators accepted in the same cycle");
    wait_rsp(0, 1); wait_rsp(1, 1);
    expect_eq(seen[0].pop_front().r.data, 32'hB001, "parallel read data, initiator 0");
    expect_eq(seen[1].pop_front().r.data, ocp_tb_pkg::init_word(1, T1 + 32'h8040),
              "parallel read data, initiator 1");

    // lock: initiator 1 locks target 0, initiator 0 must wait for the write
    send(1, mk(CMD_RDEX, T0 + 32'h8000, 0), t_b);
    expect_eq(s_locked[0], 1, "target 0 locked");
    fork
      send(0, mk(CMD_RD, T0 + 32'h104, 0), t_a);
      begin
        repeat (5) @(posedge clk);
        send(1, mk(CMD_WR, T0 + 32'h8000, 0, 32'h1111), t_b);
      end
    join
    expect_eq(t_a > t_b, 1, "locked-out initiator served only after the unlocking write");
    expect_eq(s_locked[0], 0, "lock released");
    wait_rsp(0, 1); wait_rsp(1, 2);
    seen[0].delete(); seen[1].delete();

    // error: nonexistent target
    send(0, mk(CMD_RD, 32'h7000_0000, 2), t_a);
    wait_rsp(0, 1);
    s = seen[0].pop_front();
    expect_eq(s.r.resp, RESP_ERR, "nonexistent target answered with ERR");
    expect_eq(s.r.tag, 2, "error response tag");

    repeat (3) @(posedge clk);
    expect_eq(m_idle, 2'b11, "bus idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
