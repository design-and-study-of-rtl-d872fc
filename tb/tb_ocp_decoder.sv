// tb_ocp_decoder: checks the address decoder against an independent model.
// Uses 3 slaves with slave 1 unreachable (partial crossbar) and a small
// 4 KiB populated span, and drives directed corner addresses plus random
// requests of every command, single and single-request burst.
module tb_ocp_decoder;
  import ocp_pkg::*;
  localparam int NS = 3, RL = 28, SPAN = 12;
  localparam logic [NS-1:0] CONN = 3'b101;

  ocp_req_t   req;
  logic [1:0] sel;
  logic       err;
  int checks = 0, failures = 0;

  ocp_decoder #(.NUM_S(NS), .REGION_LSB(RL), .SLAVE_SPAN(SPAN), .CONNECT(CONN)) dut (
    .req, .slave_sel(sel), .err);

  task automatic check_one();
    int unsigned region = req.addr >> RL;
    longint unsigned off = req.addr & ((32'd1 << RL) - 1);
    longint unsigned last = off;
    logic exp_err;
    if (req.single_req && req.burst_len > 1) last = off + (req.burst_len - 1) * 4;
    exp_err = 1'b0;
    if (region >= NS) exp_err = 1'b1;
    else if (!CONN[region]) exp_err = 1'b1;
    if (last >= (1 << SPAN)) exp_err = 1'b1;
    if (!(req.cmd inside {CMD_RD, CMD_RDEX, CMD_WR, CMD_WRNP})) exp_err = 1'b1;
    if (req.single_req && req.cmd inside {CMD_WR, CMD_WRNP}) exp_err = 1'b1;
    #1;
    checks++;
    if (err != exp_err || (!exp_err && sel != 2'(region))) begin
      failures++;
      $display("FAIL addr %h cmd %0d sreq %0d len %0d: sel %0d err %0d, want err %0d",
               req.addr, req.cmd, req.single_req, req.burst_len, sel, err, exp_err);
    end
  endtask

  initial begin
    req = '0;
    // directed: first and last word of each span, one past it
    for (int s = 0; s < 5; s++) begin
      req.cmd = CMD_RD;  req.burst_len = 1;
      req.addr = 32'(s) << RL;                     check_one();
      req.addr = (32'(s) << RL) + 32'hFFC;         check_one();
      req.addr = (32'(s) << RL) + 32'h1000;        check_one();
      // single-request burst running past the span end
      req.single_req = 1'b1; req.burst_len = 4;
      req.addr = (32'(s) << RL) + 32'hFF4;         check_one();
      req.addr = (32'(s) << RL) + 32'hFF0;         check_one();
      req.cmd = CMD_WR;                            check_one();
      req.single_req = 1'b0;                       check_one();
      req.cmd = CMD_BCST;                          check_one();
    end
    // random
    for (int i = 0; i < 4000; i++) begin
      req.cmd        = ocp_cmd_e'($urandom % 8);
      req.addr       = {4'($urandom % 5), 12'h0, 16'($urandom % 20'h1400)};
      req.single_req = ($urandom % 3) == 0;
      req.burst_len  = BLEN_W'($urandom % 17);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
