// ocp_crossbar: request and response switch between master and slave ports.
//
// Every master port can reach every slave port at the same time, so
// transfers between different master/slave pairs proceed in parallel; only
// masters addressing the same slave contend, and one ocp_arbiter per slave
// settles that. CONNECT[m][s] = 0 removes the path from master m to slave s
// (partial crossbar): its request and response wires are tied off and the
// master's decoder treats that slave as nonexistent.
// Request side: master m presents m_valid/m_req/m_sel (target slave); the
// granted master's request reaches slave s as s_valid/s_req with its index
// s_mid, and s_accept from the slave side is returned as m_accept to that
// master. Response side: slave s offers r_rsp labelled with r_mid; it is
// shown to master r_mid as mr_valid[r_mid][s], and that master's mr_ready
// goes back as r_ready[s]. Both directions are combinational.
// The crossbar / partial-crossbar structure with an arbiter per slave is the
// document's; the port signals are this design's.
module ocp_crossbar
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_M = 2,
  parameter int unsigned NUM_S = 2,
  parameter logic [NUM_M-1:0][NUM_S-1:0] CONNECT = '1,
  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1,
  localparam int unsigned SW = (NUM_S > 1) ? $clog2(NUM_S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests from the master ports
  input  logic [NUM_M-1:0]  m_valid,
  input  ocp_req_t          m_req   [NUM_M],
  input  logic [SW-1:0]     m_sel   [NUM_M],
  output logic [NUM_M-1:0]  m_accept,
  // requests to the slave ports
  output logic [NUM_S-1:0]  s_valid,
  output ocp_req_t          s_req   [NUM_S],
  output logic [MW-1:0]     s_mid   [NUM_S],
  input  logic [NUM_S-1:0]  s_accept,
  output logic [NUM_S-1:0]  s_locked,
  output logic [NUM_S-1:0]  s_held,
  // responses from the slave ports
  input  logic [NUM_S-1:0]  r_valid,
  input  ocp_rsp_t          r_rsp   [NUM_S],
  input  logic [MW-1:0]     r_mid   [NUM_S],
  output logic [NUM_S-1:0]  r_ready,
  // responses to the master ports
  output logic [NUM_S-1:0]  mr_valid [NUM_M],
  output ocp_rsp_t          mr_rsp   [NUM_M][NUM_S],
  input  logic [NUM_S-1:0]  mr_ready [NUM_M]
);
  logic [NUM_M-1:0] want  [NUM_S];
  logic [NUM_M-1:0] grant [NUM_S];
  logic [MW-1:0]    gidx  [NUM_S];

  for (genvar s = 0; s < NUM_S; s++) begin : g_slave
    always_comb
      for (int m = 0; m < NUM_M; m++)
        want[s][m] = CONNECT[m][s] && m_valid[m] && (m_sel[m] == SW'(s));

    ocp_arbiter #(.NUM_M(NUM_M)) u_arb (
      .clk, .rst_n,
      .valid(want[s]), .reqs(m_req),
      .accept(s_valid[s] && s_accept[s]),
      .grant(grant[s]), .grant_idx(gidx[s]),
      .locked(s_locked[s]), .held(s_held[s])
    );

    always_comb begin
      s_valid[s] = |grant[s];
      s_req[s]   = m_req[gidx[s]];
      s_mid[s]   = gidx[s];
    end
  end

  always_comb begin
    m_accept = '0;
    for (int s = 0; s < NUM_S; s++)
      for (int m = 0; m < NUM_M; m++)
        if (grant[s][m] && s_accept[s]) m_accept[m] = 1'b1;
  end

  always_comb
    for (int m = 0; m < NUM_M; m++)
      for (int s = 0; s < NUM_S; s++) begin
        mr_valid[m][s] = CONNECT[m][s] && r_valid[s] && (r_mid[s] == MW'(m));
        mr_rsp[m][s]   = r_rsp[s];
      end

  always_comb begin
    r_ready = '0;
    for (int m = 0; m < NUM_M; m++)
      for (int s = 0; s < NUM_S; s++)
        if (CONNECT[m][s] && r_valid[s] && (r_mid[s] == MW'(m)) && mr_ready[m][s])
          r_ready[s] = 1'b1;
  end
endmodule
