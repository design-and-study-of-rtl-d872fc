// ocp_pkg: types and constants shared by the OCP crossbar bus.
//
// The bus carries Open Core Protocol (OCP) requests and responses. A request
// is valid when its command is not IDLE and is held by the master until the
// slave raises the command-accept signal; a response is valid when its code is
// not NULL and is held until the master raises the response-accept signal.
// Command and response encodings follow the OCP convention (MCmd 3 bits,
// SResp 2 bits). The field widths (32-bit address and data, 2-bit tag, 5-bit
// burst length) are choices of this design.
package ocp_pkg;

  parameter int unsigned ADDR_W = 32;  // MAddr width
  parameter int unsigned DATA_W = 32;  // MData / SData width
  parameter int unsigned TAG_W  = 2;   // MTagID / STagID width
  parameter int unsigned BLEN_W = 5;   // MBurstLength width (beats, 1..16)
  parameter int unsigned NTAGS  = 1 << TAG_W;
  parameter int unsigned BYTES  = DATA_W / 8;

  typedef enum logic [2:0] {
    CMD_IDLE = 3'd0,
    CMD_WR   = 3'd1,   // posted-style write (this bus returns a response)
    CMD_RD   = 3'd2,
    CMD_RDEX = 3'd3,   // exclusive read: locks the target until a write
    CMD_RDL  = 3'd4,   // read linked   (not supported: error response)
    CMD_WRNP = 3'd5,   // non-posted write
    CMD_WRC  = 3'd6,   // write conditional (not supported: error response)
    CMD_BCST = 3'd7    // broadcast     (not supported: error response)
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'd0,
    RESP_DVA  = 2'd1,  // data valid / accept
    RESP_FAIL = 2'd2,
    RESP_ERR  = 2'd3
  } ocp_resp_e;

  // Master -> slave request group.
  typedef struct packed {
    ocp_cmd_e              cmd;
    logic [ADDR_W-1:0]     addr;
    logic [DATA_W-1:0]     data;
    logic [BLEN_W-1:0]     burst_len;   // beats of the burst; 0 counts as 1
    logic                  single_req;  // single-request burst (reads only)
    logic                  req_last;    // last request of a burst
    logic [TAG_W-1:0]      tag;
  } ocp_req_t;

  // Slave -> master response group.
  typedef struct packed {
    ocp_resp_e             resp;
    logic [DATA_W-1:0]     data;
    logic [TAG_W-1:0]      tag;
    logic                  resp_last;   // last response of a burst
  } ocp_rsp_t;

  function automatic logic is_read(ocp_cmd_e c);
    return (c == CMD_RD) || (c == CMD_RDEX);
  endfunction

  function automatic logic is_write(ocp_cmd_e c);
    return (c == CMD_WR) || (c == CMD_WRNP);
  endfunction

  // Number of responses one accepted request will produce.
  function automatic logic [BLEN_W:0] resp_count(ocp_req_t r);
    if (r.single_req && is_read(r.cmd))
      return (r.burst_len == '0) ? (BLEN_W+1)'(1) : {1'b0, r.burst_len};
    return (BLEN_W+1)'(1);
  endfunction

endpackage
