// tb_ocp_arbiter: checks one slave arbiter with three masters.
// A directed part shows fixed priority, a multi-request burst of a low
// priority master holding the slave against a higher one, and an RDEX lock
// held (even while the owner is idle) until the owner's write. A random part
// compares every grant with a reference model kept in the testbench.
module tb_ocp_arbiter;
  import ocp_pkg::*;
  localparam int NM = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NM-1:0] valid, grant;
  ocp_req_t      reqs [NM];
  logic          accept, locked, held;
  logic [1:0]    gidx;
  int checks = 0, failures = 0;

  ocp_arbiter #(.NUM_M(NM)) dut (.clk, .rst_n, .valid, .reqs, .accept,
    .grant, .grant_idx(gidx), .locked, .held);

  // reference state
  int  r_owner = 0;
  logic r_burst = 0, r_lock = 0;

  function automatic logic [NM-1:0] ref_grant();
    if (r_burst || r_lock) return valid[r_owner] ? NM'(1) << r_owner : '0;
    for (int i = 0; i < NM; i++) if (valid[i]) return NM'(1) << i;
    return '0;
  endfunction

  task automatic chk(logic [NM-1:0] want, string what);
    checks++;
    if (grant !== want) begin
      failures++;
      $display("FAIL %s: grant %b want %b (valid %b) ref o%0d b%0d l%0d dut o%0d b%0d l%0d", what, grant, want, valid, r_owner, r_burst, r_lock, dut.owner, dut.burst_hold, dut.locked);
    end
  endtask

  function automatic ocp_req_t mk(ocp_cmd_e c, logic last);
    ocp_req_t r = '0;
    r.cmd = c; r.req_last = last; r.burst_len = 1;
    return r;
  endfunction

  // one cycle: set inputs at negedge, check at posedge-1, update reference
  task automatic step(logic [NM-1:0] v, logic acc, logic [NM-1:0] want, string what);
    @(negedge clk);
    accept = 0;
    valid = v;
    accept = acc && (|grant || |v);
    #1;
    accept = acc && |grant;
    chk(want, what);
    if (accept) begin
      int g = 0;
      for (int i = NM - 1; i >= 0; i--) if (grant[i]) g = i;
      @(posedge clk);
      #1;
      r_owner = g;
      r_burst = !reqs[g].req_last;
      if (reqs[g].cmd == CMD_RDEX) r_lock = 1;
      else if (is_write(reqs[g].cmd) && reqs[g].req_last) r_lock = 0;
    end
  endtask

  initial begin
    valid = '0; accept = 0;
    for (int i = 0; i < NM; i++) reqs[i] = mk(CMD_RD, 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fixed priority
    step(3'b110, 1, 3'b010, "priority 1 over 2");
    step(3'b111, 1, 3'b001, "priority 0 first");
    // burst of master 2 holds against master 0
    reqs[2] = mk(CMD_WR, 0);
    step(3'b100, 1, 3'b100, "burst beat 1");
    step(3'b101, 1, 3'b100, "burst held");
    step(3'b001, 0, 3'b000, "burst held, owner idle");
    reqs[2] = mk(CMD_WR, 1);
    step(3'b101, 1, 3'b100, "burst last beat");
    step(3'b101, 1, 3'b001, "released after burst");
    // lock by master 1
    reqs[1] = mk(CMD_RDEX, 1);
    step(3'b010, 1, 3'b010, "rdex");
    checks++; if (!locked) begin failures++; $display("FAIL lock not set"); end
    step(3'b001, 1, 3'b000, "locked, owner idle");
    reqs[1] = mk(CMD_RD, 1);
    step(3'b011, 1, 3'b010, "locked, owner reads");
    reqs[1] = mk(CMD_WRNP, 1);
    step(3'b011, 1, 3'b010, "unlocking write");
    checks++; if (locked) begin failures++; $display("FAIL lock not cleared"); end
    step(3'b011, 1, 3'b001, "unlocked");
    // random against the reference
    for (int i = 0; i < 3000; i++) begin
      logic [NM-1:0] v;
      v = NM'($urandom);
      for (int m = 0; m < NM; m++) begin
        int c;
        c = $urandom % 6;
        reqs[m] = mk(c == 0 ? CMD_RDEX : c < 3 ? CMD_WR : CMD_RD, ($urandom % 3) != 0);
      end
      @(negedge clk);
      valid = v;
      #1;
      begin
        logic [NM-1:0] w;
        w = ref_grant();
        accept = |grant && ($urandom % 4 != 0);
        #1;
        chk(w, "random");
      end
      if (accept) begin
        int g;
        g = 0;
        for (int k = NM - 1; k >= 0; k--) if (grant[k]) g = k;
        @(posedge clk);
        #1;
        r_owner = g;
        r_burst = !reqs[g].req_last;
        if (reqs[g].cmd == CMD_RDEX) r_lock = 1;
        else if (is_write(reqs[g].cmd) && reqs[g].req_last) r_lock = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
