// tb_ocp_fsm_m: checks the slave-side wrapper with a testbench-driven target.
// Covers the one-cycle request latency to the target, holding a request
// until SCmdAccept, the limit of DEPTH outstanding transactions, labelling
// each response with the master of its request (three responses for a
// single-request read burst) and passing MRespAccept through from the
// crossbar. A random phase then streams requests through a target with
// random accept and response timing and checks every label.
module tb_ocp_fsm_m;
  import ocp_pkg::*;
  localparam int NM = 4, DEPTH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_accept, s_cmd_accept, s_resp_accept, out_valid, out_ready;
  ocp_req_t   in_req, s_req;
  logic [1:0] in_mid, out_mid;
  ocp_rsp_t   s_rsp, out_rsp;
  int checks = 0, failures = 0;

  ocp_fsm_m #(.NUM_M(NM), .DEPTH(DEPTH)) dut (.*);

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  function automatic ocp_req_t mk(ocp_cmd_e c, int a, int len, logic sreq);
    ocp_req_t r = '0;
    r.cmd = c; r.addr = 32'(a); r.burst_len = BLEN_W'(len); r.single_req = sreq;
    r.req_last = 1; r.data = 32'(a * 3);
    return r;
  endfunction

  function automatic ocp_rsp_t mkr(int d);
    ocp_rsp_t r = '0;
    r.resp = RESP_DVA; r.data = 32'(d); r.resp_last = 1;
    return r;
  endfunction

  task automatic tick();
    @(posedge clk); #1;
  endtask

  ocp_req_t a, b, c;
  int exp_mid [$];
  int n_rsp, n_req;

  initial begin
    in_valid = 0; in_req = '0; in_mid = 0; s_cmd_accept = 0; s_rsp = '0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    a = mk(CMD_RD, 'h40, 1, 0);
    b = mk(CMD_RD, 'h80, 3, 1);
    c = mk(CMD_WR, 'hC0, 1, 0);
    // A enters the request register
    in_valid = 1; in_req = a; in_mid = 2; #1;
    expect_eq(in_accept, 1, "idle wrapper takes a request");
    expect_eq(s_req.cmd, CMD_IDLE, "nothing shown before the edge");
    tick();
    expect_eq(s_req.cmd, CMD_RD, "A shown one cycle later");
    expect_eq(s_req.addr, 'h40, "A address");
    // B waits while the target withholds SCmdAccept
    in_req = b; in_mid = 1; #1;
    expect_eq(in_accept, 0, "no room while A is not accepted");
    tick();
    expect_eq(s_req.addr, 'h40, "A held");
    s_cmd_accept = 1; #1;
    expect_eq(in_accept, 1, "B taken as A is accepted");
    tick();
    expect_eq(s_req.addr, 'h80, "B shown");
    expect_eq(s_req.burst_len, 3, "B burst length");
    // C blocked: two transactions outstanding
    in_req = c; in_mid = 3; #1;
    expect_eq(in_accept, 0, "outstanding limit");
    tick();
    s_cmd_accept = 0;
    expect_eq(s_req.cmd, CMD_IDLE, "B accepted, register empty");
    expect_eq(in_accept, 0, "still full");
    // response of A: labelled master 2, MRespAccept follows the crossbar
    s_rsp = mkr(11); #1;
    expect_eq(out_valid, 1, "response offered");
    expect_eq(out_mid, 2, "response of A goes to master 2");
    expect_eq(s_resp_accept, 0, "not accepted without ready");
    out_ready = 1; #1;
    expect_eq(s_resp_accept, 1, "accepted with ready");
    tick();
    expect_eq(in_accept, 1, "room again after A completed");
    s_rsp = '0;
    tick();
    in_valid = 0;
    s_cmd_accept = 1;
    // three responses of B, then C
    for (int i = 0; i < 3; i++) begin
      s_rsp = mkr(20 + i); #1;
      expect_eq(out_mid, 1, "burst response to master 1");
      expect_eq(out_rsp.data, 20 + i, "burst data passed through");
      tick();
      s_cmd_accept = 0;
    end
    s_rsp = mkr(30); #1;
    expect_eq(out_mid, 3, "C response to master 3");
    tick();
    s_rsp = '0; s_cmd_accept = 0; #1;
    expect_eq(out_valid, 0, "nothing outstanding");
    // random streaming
    n_rsp = 0; n_req = 0;
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          @(negedge clk);
          in_valid = 1;
          in_req = mk(CMD_RD, i * 4, 1 + $urandom % 3, $urandom % 2);
          in_mid = 2'($urandom);
          do @(posedge clk); while (!in_accept);
          for (int k = 0; k < int'(resp_count(in_req)); k++) exp_mid.push_back(int'(in_mid));
          n_req++;
          #1;
          in_valid = 0;
        end
      end
      begin
        int pend;
        pend = 0;
        forever begin
          @(negedge clk);
          s_cmd_accept = (s_req.cmd != CMD_IDLE) && ($urandom % 2);
          out_ready = $urandom % 2;
          s_rsp = (exp_mid.size() > 0 && ($urandom % 3 != 0)) ? mkr(n_rsp) : '0;
          @(posedge clk);
          if (s_rsp.resp != RESP_NULL) begin
            checks++;
            if (!out_valid || out_mid != 2'(exp_mid[0])) begin
              failures++;
              $display("FAIL random label: %0d want %0d", out_mid, exp_mid[0]);
            end
            if (s_resp_accept) begin void'(exp_mid.pop_front()); n_rsp++; end
          end
        end
      end
      begin
        wait (n_req == 300 && exp_mid.size() == 0);
      end
    join_any
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
