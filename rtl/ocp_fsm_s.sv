// ocp_fsm_s: master-side bus wrapper (FSM-S).
//
// Faces one system initiator and acts as the OCP slave for it: it takes the
// initiator's requests (MCmd/MAddr/MData/... with SCmdAccept) and returns
// responses (SResp/SData/... with MRespAccept). Inside it
//   - the address decoder picks the target slave or flags an illegal request;
//   - the scheduler checks that issuing the request keeps each tag's responses
//     in order and picks which waiting slave response goes back next;
//   - a two-state controller (IDLE / BURST) keeps all beats of a
//     multi-request burst on the slave the first beat decoded to;
//   - an error responder answers illegal requests itself with ERR responses
//     (one per request, or one per beat of a single-request read burst).
// Legal requests go to the crossbar as bus_valid/bus_req/bus_sel and are
// accepted towards the initiator in the same cycle the crossbar accepts them
// (bus_accept), so SCmdAccept is combinational. Responses pass through
// combinationally from the crossbar (src_*) to the initiator.
// The role of FSM-S (OCP slave towards the initiator, handling single, burst,
// pipelined and out-of-order transactions) and the decoder's error response
// are from the document; the states, the error responder and the timing are
// this design's choices.
module ocp_fsm_s
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_S      = 2,
  parameter int unsigned REGION_LSB = 28,
  parameter int unsigned SLAVE_SPAN = 16,
  parameter int unsigned MAX_OUT    = 32,
  parameter logic [NUM_S-1:0] CONNECT = '1,
  localparam int unsigned SW   = (NUM_S > 1) ? $clog2(NUM_S) : 1,
  localparam int unsigned NSRC = NUM_S + 1,
  localparam int unsigned XW   = $clog2(NSRC)
) (
  input  logic              clk,
  input  logic              rst_n,
  // OCP port towards the system initiator
  input  ocp_req_t          m_req,
  output logic              m_cmd_accept,
  output ocp_rsp_t          m_rsp,
  input  logic              m_resp_accept,
  // request channel into the crossbar
  output logic              bus_valid,
  output ocp_req_t          bus_req,
  output logic [SW-1:0]     bus_sel,
  input  logic              bus_accept,
  // response channels out of the crossbar, one per slave
  input  logic [NUM_S-1:0]  src_valid,
  input  ocp_rsp_t          src_rsp [NUM_S],
  output logic [NUM_S-1:0]  src_ready,
  output logic              idle          // no response owed to the initiator
);
  typedef enum logic {S_IDLE, S_BURST} state_e;
  state_e state;

  logic [SW-1:0] dec_sel, burst_sel, sel;
  logic          dec_err, burst_err, err;
  logic          valid, iss_ok, fire;
  logic [XW-1:0] iss_src;

  // error responder
  logic              e_busy;
  logic [BLEN_W:0]   e_left;
  logic [TAG_W-1:0]  e_tag;
  logic              e_last;

  logic [NSRC-1:0]   all_valid, all_ready;
  ocp_rsp_t          all_rsp [NSRC];

  ocp_decoder #(
    .NUM_S(NUM_S), .REGION_LSB(REGION_LSB), .SLAVE_SPAN(SLAVE_SPAN), .CONNECT(CONNECT)
  ) u_dec (
    .req(m_req), .slave_sel(dec_sel), .err(dec_err)
  );

  always_comb begin
    valid   = (m_req.cmd != CMD_IDLE);
    sel     = (state == S_BURST) ? burst_sel : dec_sel;
    err     = (state == S_BURST) ? burst_err : dec_err;
    iss_src = err ? XW'(NUM_S) : XW'(sel);
  end

  ocp_scheduler #(.NUM_S(NUM_S), .MAX_OUT(MAX_OUT)) u_sched (
    .clk, .rst_n,
    .iss_valid(valid), .iss_tag(m_req.tag), .iss_src(iss_src),
    .iss_cnt(resp_count(m_req)), .iss_ok(iss_ok), .iss_fire(fire),
    .src_valid(all_valid), .src_rsp(all_rsp), .src_ready(all_ready),
    .m_rsp(m_rsp), .m_resp_accept(m_resp_accept), .idle(idle)
  );

  always_comb begin
    bus_req      = m_req;
    bus_sel      = sel;
    bus_valid    = valid && iss_ok && !err;
    fire         = err ? (valid && iss_ok && !e_busy) : (bus_valid && bus_accept);
    m_cmd_accept = fire;
  end

  // response sources: the slaves, then the error responder
  always_comb begin
    for (int s = 0; s < NUM_S; s++) begin
      all_valid[s] = src_valid[s];
      all_rsp[s]   = src_rsp[s];
    end
    all_valid[NUM_S]      = e_busy;
    all_rsp[NUM_S].resp   = RESP_ERR;
    all_rsp[NUM_S].data   = '0;
    all_rsp[NUM_S].tag    = e_tag;
    all_rsp[NUM_S].resp_last = e_last && (e_left == (BLEN_W+1)'(1));
    src_ready = all_ready[NUM_S-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      burst_sel <= '0;
      burst_err <= 1'b0;
      e_busy    <= 1'b0;
      e_left    <= '0;
      e_tag     <= '0;
      e_last    <= 1'b0;
    end else begin
      if (fire) begin
        if (!m_req.req_last && !m_req.single_req) begin
          state     <= S_BURST;
          burst_sel <= sel;
          burst_err <= err;
        end else begin
          state <= S_IDLE;
        end
      end
      if (fire && err) begin
        e_busy <= 1'b1;
        e_left <= resp_count(m_req);
        e_tag  <= m_req.tag;
        e_last <= m_req.req_last || m_req.single_req;
      end else if (e_busy && all_ready[NUM_S]) begin
        e_left <= e_left - 1'b1;
        if (e_left == (BLEN_W+1)'(1)) e_busy <= 1'b0;
      end
    end
  end

  // OCP: a request, once shown, stays until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !m_cmd_accept |=> $stable(m_req));
endmodule
