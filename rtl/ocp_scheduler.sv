// ocp_scheduler: ordering control of one master port.
//
// OCP lets responses return in a different order from their requests as long
// as requests with the same tag (MTagID) complete in order. The scheduler
// keeps, for every tag, the number of responses still owed to the master and
// the source (slave, or the port's own error responder, index NUM_S) they
// will come from. Two rules follow:
//   - issue: a request with tag t may go to source s only if no response
//     with tag t is owed, or all owed ones come from s as well. A slave answers
//     in request order, so each tag's responses then arrive in order, and a
//     response that reaches the port can always be delivered (no response
//     waits on another slave, so no cross-slave deadlock). A tag also stops
//     taking requests when MAX_OUT responses are owed.
//   - return: responses waiting at different sources belong to different
//     tags, so they are returned in any order; a round-robin pointer chooses
//     among them, and a response once shown to the master is held until the
//     master accepts it (MRespAccept).
// Interface: iss_* asks for permission (iss_ok is combinational), iss_fire
// records the issue; src_valid/src_rsp/src_ready are the per-source response
// channels; m_rsp/m_resp_accept is the master's OCP response group.
// The scheduler's purpose (ordering of out-of-order transactions) is from the
// document; the per-tag counting scheme is this design's own.
module ocp_scheduler
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_S   = 2,
  parameter int unsigned MAX_OUT = 32,
  localparam int unsigned NSRC = NUM_S + 1,
  localparam int unsigned XW   = $clog2(NSRC),
  localparam int unsigned CW   = $clog2(MAX_OUT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue side
  input  logic              iss_valid,
  input  logic [TAG_W-1:0]  iss_tag,
  input  logic [XW-1:0]     iss_src,
  input  logic [BLEN_W:0]   iss_cnt,
  output logic              iss_ok,
  input  logic              iss_fire,
  // responses from the sources
  input  logic [NSRC-1:0]   src_valid,
  input  ocp_rsp_t          src_rsp [NSRC],
  output logic [NSRC-1:0]   src_ready,
  // OCP response group towards the master
  output ocp_rsp_t          m_rsp,
  input  logic              m_resp_accept,
  output logic              idle          // nothing owed on any tag
);
  logic [CW-1:0] owed [NTAGS];
  logic [XW-1:0] from [NTAGS];
  logic [XW-1:0] rr, cur, pick;
  logic          showing, any;
  logic          rsp_fire;
  logic [TAG_W-1:0] rsp_tag;

  // issue permission
  always_comb begin
    iss_ok = iss_valid &&
             ((owed[iss_tag] == '0) || (from[iss_tag] == iss_src)) &&
             ({1'b0, owed[iss_tag]} + (CW+1)'(iss_cnt) <= (CW+1)'(MAX_OUT));
  end

  // round-robin choice of the next response source
  always_comb begin
    pick = rr;
    any  = 1'b0;
    for (int k = NSRC - 1; k >= 0; k--) begin
      logic [XW:0] j;
      j = {1'b0, rr} + (XW+1)'(k);
      if (j >= (XW+1)'(NSRC)) j = j - (XW+1)'(NSRC);
      if (src_valid[XW'(j)]) begin
        pick = XW'(j);
        any  = 1'b1;
      end
    end
    if (showing) begin
      pick = cur;
      any  = src_valid[cur];
    end
  end

  always_comb begin
    m_rsp     = '0;
    src_ready = '0;
    if (any) begin
      m_rsp           = src_rsp[pick];
      src_ready[pick] = m_resp_accept;
    end
    rsp_fire = any && m_resp_accept;
    rsp_tag  = m_rsp.tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAGS; t++) begin
        owed[t] <= '0;
        from[t] <= '0;
      end
      rr      <= '0;
      cur     <= '0;
      showing <= 1'b0;
    end else begin
      for (int t = 0; t < NTAGS; t++) begin
        automatic logic inc = iss_fire && (iss_tag == TAG_W'(t));
        automatic logic dec = rsp_fire && (rsp_tag == TAG_W'(t));
        owed[t] <= owed[t] + (inc ? CW'(iss_cnt) : '0) - (dec ? CW'(1) : '0);
        if (inc) from[t] <= iss_src;
      end
      showing <= any && !m_resp_accept;
      cur     <= pick;
      if (rsp_fire) rr <= (pick == XW'(NSRC - 1)) ? '0 : pick + 1'b1;
    end
  end

  always_comb begin
    idle = 1'b1;
    for (int t = 0; t < NTAGS; t++) if (owed[t] != '0) idle = 1'b0;
  end

  // Issue only with permission; every delivered response was owed, from the
  // source recorded for its tag.
  a_issue_ok: assert property (@(posedge clk) disable iff (!rst_n) iss_fire |-> iss_ok);
  a_rsp_owed: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_fire |-> owed[rsp_tag] != '0 && from[rsp_tag] == pick);
endmodule
