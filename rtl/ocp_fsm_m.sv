// ocp_fsm_m: slave-side bus wrapper (FSM-M).
//
// Faces one system target and acts as the OCP master for it. A request the
// crossbar grants to this slave is taken into a one-entry request register
// (state REQ) and shown to the target on the next cycle; it stays there until
// the target raises SCmdAccept. A new request can be taken in the cycle the
// current one is accepted, so back-to-back requests reach the target at one
// per cycle. Every accepted request also writes a record (which master,
// how many responses) into an outstanding FIFO of DEPTH entries, so up to
// DEPTH transactions can be in flight at the target (pipelined
// transactions). The target answers in request order; each response is
// labelled with the master at the head of the FIFO and handed to the
// crossbar, and the target sees MRespAccept when that master's port takes it.
// A record leaves the FIFO with its last response (one for a single request,
// burst-length ones for a single-request read burst).
// The role of FSM-M (OCP master towards the target) follows the document;
// the request register, the FIFO and its depth are this design's choices.
module ocp_fsm_m
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_M = 2,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1,
  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // granted request from the crossbar
  input  logic              in_valid,
  input  ocp_req_t          in_req,
  input  logic [MW-1:0]     in_mid,
  output logic              in_accept,
  // OCP port towards the system target
  output ocp_req_t          s_req,
  input  logic              s_cmd_accept,
  input  ocp_rsp_t          s_rsp,
  output logic              s_resp_accept,
  // labelled response towards the crossbar
  output logic              out_valid,
  output ocp_rsp_t          out_rsp,
  output logic [MW-1:0]     out_mid,
  input  logic              out_ready
);
  typedef enum logic {R_IDLE, R_REQ} state_e;
  state_e state;

  typedef struct packed {
    logic [MW-1:0]   mid;
    logic [BLEN_W:0] left;
  } rec_t;

  rec_t          fifo [DEPTH];
  logic [DW-1:0] wp, rp;
  logic [DW:0]   cnt;
  logic          push, pop, rsp_fire;

  always_comb begin
    in_accept     = ((state == R_IDLE) || s_cmd_accept) && (cnt < (DW+1)'(DEPTH));
    push          = in_valid && in_accept;
    out_valid     = (s_rsp.resp != RESP_NULL) && (cnt != '0);
    out_rsp       = s_rsp;
    out_mid       = fifo[rp].mid;
    s_resp_accept = out_valid && out_ready;
    rsp_fire      = s_resp_accept;
    pop           = rsp_fire && (fifo[rp].left == (BLEN_W+1)'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      s_req <= '0;
      wp    <= '0;
      rp    <= '0;
      cnt   <= '0;
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      if (push) begin
        state    <= R_REQ;
        s_req    <= in_req;
        fifo[wp] <= '{mid: in_mid, left: resp_count(in_req)};
        wp       <= (wp == DW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end else if (s_cmd_accept) begin
        state     <= R_IDLE;
        s_req.cmd <= CMD_IDLE;
      end
      if (rsp_fire && !pop) fifo[rp].left <= fifo[rp].left - 1'b1;
      if (pop) rp <= (rp == DW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (DW+1)'(push) - (DW+1)'(pop);
    end
  end

  // The target only answers requests it was given.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.resp != RESP_NULL |-> cnt != '0);
  a_accept_when_shown: assert property (@(posedge clk) disable iff (!rst_n)
    s_cmd_accept |-> state == R_REQ);
endmodule
