// ocp_mem_model: behavioural OCP memory target for the testbenches.
//
// Not synthesizable. Acts as an OCP slave: it accepts a request (randomly
// withholding SCmdAccept STALL_PCT percent of the time), performs it on a
// sparse word memory at once, and queues its responses, each of which becomes
// visible LATENCY cycles after acceptance and stays until MRespAccept.
// Responses come back in request order. A write gets one DVA response; a read
// one DVA with data; a single-request read burst burst_len DVA responses
// from incrementing word addresses. SRespLast is set on the response to a
// request with req_last set, and on the final beat of a read burst. Words
// never written read as ocp_tb_pkg::init_word(ID, address).
module ocp_mem_model
  import ocp_pkg::*;
#(
  parameter int unsigned ID        = 0,
  parameter int unsigned LATENCY   = 2,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ocp_req_t req,
  output logic     cmd_accept,
  output ocp_rsp_t rsp,
  input  logic     resp_accept
);
  typedef struct { ocp_rsp_t r; longint due; } ent_t;
  ent_t              q [$];
  logic [31:0]       mem [logic [31:0]];
  longint            cyc;
  int unsigned       n_acc;

  function automatic logic [31:0] rd(logic [31:0] a);
    return mem.exists(a) ? mem[a] : ocp_tb_pkg::init_word(ID, a);
  endfunction

  always_ff @(negedge clk) begin
    cmd_accept <= rst_n && (req.cmd != CMD_IDLE) && (($urandom % 100) >= STALL_PCT);
  end

  always @* begin
    rsp = '0;
    if (q.size() != 0 && q[0].due < cyc) rsp = q[0].r;
  end

  // Sample at the clock edge, then update the queue just after it, so the
  // bus never sees this cycle's changes at the edge they were sampled on.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      cyc   = 0;
      n_acc = 0;
    end else begin
      logic     do_pop, do_acc;
      ocp_req_t rq;
      do_pop = rsp.resp != RESP_NULL && resp_accept;
      do_acc = cmd_accept && req.cmd != CMD_IDLE;
      rq     = req;
      #1;
      cyc++;
      if (do_pop) void'(q.pop_front());
      if (do_acc) begin
        ocp_rsp_t r;
        n_acc++;
        r = '0;
        r.resp = RESP_DVA;
        r.tag  = rq.tag;
        if (is_write(rq.cmd)) begin
          mem[rq.addr] = rq.data;
          r.resp_last = rq.req_last;
          q.push_back('{r: r, due: cyc + longint'(LATENCY) - 1});
        end else begin
          int n;
          n = int'(resp_count(rq));
          for (int i = 0; i < n; i++) begin
            r.data      = rd(rq.addr + 32'(i * BYTES));
            r.resp_last = rq.single_req ? (i == n - 1) : rq.req_last;
            q.push_back('{r: r, due: cyc + longint'(LATENCY) - 1 + longint'(i)});
          end
        end
      end
    end
  end
endmodule
