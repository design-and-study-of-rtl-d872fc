// ocp_arbiter: access arbiter of one slave port of the crossbar.
//
// Every slave has its own arbiter, so contention only arises between masters
// that address the same slave at the same time. Masters have fixed
// priorities, master 0 highest. A grant is normally decided afresh for every
// request, so a high-priority master pre-empts a lower one between requests;
// two mechanisms keep the grant with its owner instead:
//   - burst hold: after a beat of a multi-request burst that is not the last
//     (req_last low) the owner keeps the slave until its last beat;
//   - lock: an exclusive read (RDEX) locks the slave to its master until that
//     master's next write (WR or WRNP, last beat) is accepted.
// While held, nobody else is granted, even if the owner is momentarily idle.
// Interface: valid/reqs are the requests routed to this slave, grant is
// one-hot and combinational, accept marks the cycle in which the granted
// request was taken by the slave side. State changes on accept only.
// Per-slave arbitration and the purpose of lock follow the document; fixed
// priority and the RDEX-to-write lock rule are this design's choices.
module ocp_arbiter
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_M = 2,
  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_M-1:0]  valid,
  input  ocp_req_t          reqs [NUM_M],
  input  logic              accept,
  output logic [NUM_M-1:0]  grant,
  output logic [MW-1:0]     grant_idx,
  output logic              locked,      // a lock is in force
  output logic              held         // burst hold or lock in force
);
  logic [MW-1:0] owner;
  logic          burst_hold;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    held      = burst_hold || locked;
    if (held) begin
      grant_idx = owner;
      grant[owner] = valid[owner];
    end else begin
      for (int i = NUM_M - 1; i >= 0; i--)
        if (valid[i]) grant_idx = MW'(i);
      grant[grant_idx] = valid[grant_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner      <= '0;
      burst_hold <= 1'b0;
      locked     <= 1'b0;
    end else if (accept) begin
      owner      <= grant_idx;
      burst_hold <= !reqs[grant_idx].req_last;
      if (reqs[grant_idx].cmd == CMD_RDEX)
        locked <= 1'b1;
      else if (is_write(reqs[grant_idx].cmd) && reqs[grant_idx].req_last)
        locked <= 1'b0;
    end
  end

  // A grant is only ever taken by a requesting master.
  a_accept_granted: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> valid[grant_idx] && grant[grant_idx]);
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
