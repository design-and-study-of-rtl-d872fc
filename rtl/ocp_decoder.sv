// ocp_decoder: address decoder of one master port.
//
// Maps the request address to the slave it targets and decides whether the
// request is legal. The address space is split into equal regions of
// 2**REGION_LSB bytes; region i belongs to slave i, and only its first
// 2**SLAVE_SPAN bytes are populated. A request is illegal (the bus answers it
// with an ERR response instead of forwarding it) when
//   - the region number is not a slave (nonexistent address),
//   - the offset, or for a single-request burst the last beat's offset, lies
//     beyond the populated span (illegal address),
//   - this master has no path to that slave in a partial crossbar (CONNECT),
//   - the command is one the bus does not carry (RDL, WRC, BCST, or a
//     single-request burst write).
// Purely combinational. Routing by address and the error check follow the
// document's decoder; the region layout is this design's choice.
module ocp_decoder
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_S      = 2,
  parameter int unsigned REGION_LSB = 28,
  parameter int unsigned SLAVE_SPAN = 16,
  parameter logic [NUM_S-1:0] CONNECT = '1,   // paths of this master
  localparam int unsigned SW = (NUM_S > 1) ? $clog2(NUM_S) : 1
) (
  input  ocp_req_t          req,
  output logic [SW-1:0]     slave_sel,
  output logic              err
);
  localparam int unsigned RW = ADDR_W - REGION_LSB;

  logic [RW-1:0]         region;
  logic [REGION_LSB-1:0] offset;
  logic [REGION_LSB:0]   last_off;
  logic                  cmd_ok, exists, in_span;

  always_comb begin
    region   = req.addr[ADDR_W-1:REGION_LSB];
    offset   = req.addr[REGION_LSB-1:0];
    last_off = {1'b0, offset};
    if (req.single_req && req.burst_len > 1)
      last_off = {1'b0, offset} + (REGION_LSB+1)'((32'(req.burst_len) - 32'd1) * BYTES);
    exists    = (region < RW'(NUM_S));
    in_span   = (last_off < (REGION_LSB+1)'(1) << SLAVE_SPAN);
    cmd_ok    = is_read(req.cmd) || (is_write(req.cmd) && !req.single_req);
    slave_sel = exists ? SW'(region) : '0;
    err       = !(exists && in_span && cmd_ok && CONNECT[slave_sel]);
  end
endmodule
