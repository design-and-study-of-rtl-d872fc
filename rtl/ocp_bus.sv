// ocp_bus: crossbar on-chip bus with Open Core Protocol ports.
//
// NUM_M system initiators connect to the bus's OCP slave ports (m_*), NUM_S
// system targets to its OCP master ports (s_*). Each initiator port has an
// FSM-S wrapper (decoder, scheduler, error responder), each target port an
// FSM-M wrapper (request register, outstanding FIFO), and a crossbar with
// one arbiter per target joins them, so different initiator/target pairs
// transfer in parallel. The bus carries single, burst (multi-request and
// single-request read), locked (RDEX ... write), pipelined (several
// outstanding requests) and out-of-order (different tags, different targets)
// transactions; requests to illegal or unconnected addresses get ERR
// responses from the initiator's own port.
// Timing: a request is accepted by the initiator's port in the cycle the
// target's FSM-M has room (SCmdAccept is combinational), reaches the target
// one cycle later, and the response returns combinationally from target to
// initiator. Address map: target s owns addresses s * 2**REGION_LSB up to
// s * 2**REGION_LSB + 2**SLAVE_SPAN - 1.
// The architecture (OCP wrappers, crossbar, per-slave arbiters, decoder,
// scheduler) is the document's; the port counts, widths, depths and address
// map are this design's choices.
module ocp_bus
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_M      = 2,
  parameter int unsigned NUM_S      = 2,
  parameter int unsigned REGION_LSB = 28,
  parameter int unsigned SLAVE_SPAN = 16,
  parameter int unsigned MAX_OUT    = 32,
  parameter int unsigned DEPTH      = 4,
  parameter logic [NUM_M-1:0][NUM_S-1:0] CONNECT = '1,
  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1,
  localparam int unsigned SW = (NUM_S > 1) ? $clog2(NUM_S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // OCP slave ports, one per system initiator
  input  ocp_req_t          m_req         [NUM_M],
  output logic [NUM_M-1:0]  m_cmd_accept,
  output ocp_rsp_t          m_rsp         [NUM_M],
  input  logic [NUM_M-1:0]  m_resp_accept,
  // OCP master ports, one per system target
  output ocp_req_t          s_req         [NUM_S],
  input  logic [NUM_S-1:0]  s_cmd_accept,
  input  ocp_rsp_t          s_rsp         [NUM_S],
  output logic [NUM_S-1:0]  s_resp_accept,
  // status
  output logic [NUM_S-1:0]  s_locked,     // target locked to one initiator
  output logic [NUM_S-1:0]  s_held,       // target held by a burst or lock
  output logic [NUM_M-1:0]  m_idle        // nothing owed to the initiator
);
  // master ports -> crossbar
  logic [NUM_M-1:0] bus_valid, bus_accept;
  ocp_req_t         bus_req [NUM_M];
  logic [SW-1:0]    bus_sel [NUM_M];
  logic [NUM_S-1:0] mr_valid [NUM_M];
  ocp_rsp_t         mr_rsp   [NUM_M][NUM_S];
  logic [NUM_S-1:0] mr_ready [NUM_M];
  // crossbar -> slave ports
  logic [NUM_S-1:0] x_valid, x_accept;
  ocp_req_t         x_req [NUM_S];
  logic [MW-1:0]    x_mid [NUM_S];
  logic [NUM_S-1:0] r_valid, r_ready;
  ocp_rsp_t         r_rsp [NUM_S];
  logic [MW-1:0]    r_mid [NUM_S];

  for (genvar m = 0; m < NUM_M; m++) begin : g_m
    ocp_fsm_s #(
      .NUM_S(NUM_S), .REGION_LSB(REGION_LSB), .SLAVE_SPAN(SLAVE_SPAN),
      .MAX_OUT(MAX_OUT), .CONNECT(CONNECT[m])
    ) u_fsm_s (
      .clk, .rst_n,
      .m_req(m_req[m]), .m_cmd_accept(m_cmd_accept[m]),
      .m_rsp(m_rsp[m]), .m_resp_accept(m_resp_accept[m]),
      .bus_valid(bus_valid[m]), .bus_req(bus_req[m]), .bus_sel(bus_sel[m]),
      .bus_accept(bus_accept[m]),
      .src_valid(mr_valid[m]), .src_rsp(mr_rsp[m]), .src_ready(mr_ready[m]),
      .idle(m_idle[m])
    );
  end

  ocp_crossbar #(.NUM_M(NUM_M), .NUM_S(NUM_S), .CONNECT(CONNECT)) u_xbar (
    .clk, .rst_n,
    .m_valid(bus_valid), .m_req(bus_req), .m_sel(bus_sel), .m_accept(bus_accept),
    .s_valid(x_valid), .s_req(x_req), .s_mid(x_mid), .s_accept(x_accept),
    .s_locked(s_locked), .s_held(s_held),
    .r_valid(r_valid), .r_rsp(r_rsp), .r_mid(r_mid), .r_ready(r_ready),
    .mr_valid(mr_valid), .mr_rsp(mr_rsp), .mr_ready(mr_ready)
  );

  for (genvar s = 0; s < NUM_S; s++) begin : g_s
    ocp_fsm_m #(.NUM_M(NUM_M), .DEPTH(DEPTH)) u_fsm_m (
      .clk, .rst_n,
      .in_valid(x_valid[s]), .in_req(x_req[s]), .in_mid(x_mid[s]),
      .in_accept(x_accept[s]),
      .s_req(s_req[s]), .s_cmd_accept(s_cmd_accept[s]),
      .s_rsp(s_rsp[s]), .s_resp_accept(s_resp_accept[s]),
      .out_valid(r_valid[s]), .out_rsp(r_rsp[s]), .out_mid(r_mid[s]),
      .out_ready(r_ready[s])
    );
  end
endmodule
