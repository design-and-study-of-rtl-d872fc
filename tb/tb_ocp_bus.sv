// tb_ocp_bus: end-to-end test of the OCP crossbar bus at its default size.
//
// Two initiators drive random traffic into the bus; two memory targets
// answer it, target 0 after 1 cycle and target 1 after 7 cycles, so that
// responses with different tags overtake each other. Each initiator mixes
// single reads and writes, multi-request write and read bursts,
// single-request read bursts, locked RDEX+write pairs and requests to
// illegal addresses, with up to several requests outstanding. Initiator m
// only writes words whose address bit 15 equals m, so a per-initiator shadow
// memory predicts every read. Responses are checked per tag against a queue
// of expected responses filled when each request is accepted, which checks
// data, response code, SRespLast and the per-tag ordering rule. The test also
// counts how often each bus mechanism happened and fails if one never did.
module tb_ocp_bus;
  import ocp_pkg::*;

  localparam int NM = 2, NS = 2, NTX = 1000;
  localparam int REGION_LSB = 28;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ocp_req_t         m_req [NM];
  logic [NM-1:0]    m_cmd_accept, m_resp_accept, m_idle;
  ocp_rsp_t         m_rsp [NM];
  ocp_req_t         s_req [NS];
  logic [NS-1:0]    s_cmd_accept, s_resp_accept, s_locked, s_held;
  ocp_rsp_t         s_rsp [NS];

  ocp_bus dut (.*);

  ocp_mem_model #(.ID(0), .LATENCY(1), .STALL_PCT(15)) u_t0 (
    .clk, .rst_n, .req(s_req[0]), .cmd_accept(s_cmd_accept[0]),
    .rsp(s_rsp[0]), .resp_accept(s_resp_accept[0]));
  ocp_mem_model #(.ID(1), .LATENCY(7), .STALL_PCT(30)) u_t1 (
    .clk, .rst_n, .req(s_req[1]), .cmd_accept(s_cmd_accept[1]),
    .rsp(s_rsp[1]), .resp_accept(s_resp_accept[1]));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_single, n_mburst, n_sburst, n_lock, n_lock_block, n_pipe, n_ooo;
  int n_err, n_stall, n_contend, n_parallel, n_burst_block;

  typedef struct { ocp_resp_e resp; logic [31:0] data; logic chk; logic last; int seq; } exp_t;
  exp_t        expq   [NM][NTAGS][$];
  logic [31:0] shadow [NM][logic [31:0]];
  int          seqno  [NM];
  int          maxseq [NM];
  int          owed   [NM];
  int          done_tx [NM];
  int          holder  [NS];

  function automatic logic [31:0] predict(int m, logic [31:0] a);
    int unsigned t = int'(a[31:REGION_LSB]);
    return shadow[m].exists(a) ? shadow[m][a] : ocp_tb_pkg::init_word(t, a);
  endfunction

  function automatic int tgt_of(logic [31:0] a);
    return int'(a[31:REGION_LSB]);
  endfunction

  // Record what an accepted request must produce.
  function automatic void expect_req(int m, ocp_req_t r, logic illegal);
    int n = int'(resp_count(r));
    for (int i = 0; i < n; i++) begin
      exp_t e;
      logic [31:0] a = r.addr + 32'(i * BYTES);
      e.resp = illegal ? RESP_ERR : RESP_DVA;
      e.chk  = !(illegal || is_write(r.cmd));
      e.data = e.chk ? predict(m, a) : '0;
      e.last = r.single_req ? (i == n - 1) : r.req_last;
      e.seq  = seqno[m];
      expq[m][r.tag].push_back(e);
      owed[m]++;
    end
    seqno[m]++;
    if (!illegal && is_write(r.cmd)) shadow[m][r.addr] = r.data;
  endfunction

  // Drive one request and wait for SCmdAccept.
  task automatic send(int m, ocp_req_t r, logic illegal);
    @(negedge clk);
    m_req[m] = r;
    do @(posedge clk); while (!m_cmd_accept[m]);
    expect_req(m, r, illegal);
    @(negedge clk);
    m_req[m] = '0;
  endtask

  function automatic logic [31:0] rand_addr(int m, int t);
    logic [31:0] a;
    a = {4'(t), 12'h000, 1'(m), 4'h0, 9'($urandom % 64), 2'b00};
    return a;
  endfunction

  task automatic initiator(int m);
    for (int i = 0; i < NTX; i++) begin
      ocp_req_t r;
      int op  = $urandom % 8;
      int t   = $urandom % NS;
      int len;
      r = '0;
      r.tag = TAG_W'($urandom % NTAGS);
      r.addr = rand_addr(m, t);
      r.burst_len = 1;
      r.req_last = 1'b1;
      case (op)
        0, 1: begin  // single write
          r.cmd = ($urandom % 2 == 1) ? CMD_WR : CMD_WRNP;
          r.data = $urandom;
          send(m, r, 1'b0); n_single++;
        end
        2, 3: begin  // single read
          r.cmd = CMD_RD;
          send(m, r, 1'b0); n_single++;
        end
        4: begin     // multi-request burst, write or read
          len = 2 + $urandom % 3;
          r.cmd = ($urandom % 2 == 1) ? CMD_WR : CMD_RD;
          r.addr[8:0] = 9'($urandom % 32) << 2;
          r.burst_len = BLEN_W'(len);
          for (int b = 0; b < len; b++) begin
            r.data = $urandom;
            r.req_last = (b == len - 1);
            send(m, r, 1'b0);
            r.addr += BYTES;
          end
          n_mburst++;
        end
        5: begin     // single-request read burst
          len = 2 + $urandom % 7;
          r.cmd = CMD_RD;
          r.single_req = 1'b1;
          r.addr[8:0] = 9'($urandom % 32) << 2;
          r.burst_len = BLEN_W'(len);
          send(m, r, 1'b0); n_sburst++;
        end
        6: begin     // locked read-modify-write
          r.cmd = CMD_RDEX;
          send(m, r, 1'b0);
          repeat ($urandom % 4) @(negedge clk);
          r.cmd = CMD_WR;
          r.data = $urandom;
          send(m, r, 1'b0); n_lock++;
        end
        default: begin  // illegal: beyond the populated span, or no target
          r.cmd = CMD_RD;
          if ($urandom % 2 == 1) r.addr[20] = 1'b1;
          else r.addr[31:28] = 4'(NS + $urandom % 3);
          if ($urandom % 2 == 1) begin
            r.single_req = 1'b1;
            r.burst_len = BLEN_W'(2 + $urandom % 3);
          end
          send(m, r, 1'b1); n_err++;
        end
      endcase
      done_tx[m]++;
    end
  endtask

  // Response side: random MRespAccept, check every response.
  for (genvar m = 0; m < NM; m++) begin : g_rsp
    always @(negedge clk) m_resp_accept[m] <= ($urandom % 100) < 75;
    always @(posedge clk) if (rst_n && m_rsp[m].resp != RESP_NULL && m_resp_accept[m]) begin
      int tg;
      exp_t e;
      tg = int'(m_rsp[m].tag);
      checks++;
      if (expq[m][tg].size() == 0) begin
        failures++;
        $display("FAIL m%0d: unexpected response tag %0d", m, tg);
      end else begin
        e = expq[m][tg].pop_front();
        owed[m]--;
        if (m_rsp[m].resp != e.resp || m_rsp[m].resp_last != e.last ||
            (e.chk && m_rsp[m].data != e.data)) begin
          failures++;
          $display("FAIL m%0d tag %0d: got resp %0d data %h last %0d, want %0d %h %0d",
                   m, tg, m_rsp[m].resp, m_rsp[m].data, m_rsp[m].resp_last,
                   e.resp, e.data, e.last);
        end
        if (e.seq < maxseq[m]) n_ooo++;
        if (e.seq > maxseq[m]) maxseq[m] = e.seq;
      end
    end
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) begin
      if (m_req[m].cmd != CMD_IDLE && !m_cmd_accept[m]) n_stall++;
      if (owed[m] >= 2) n_pipe++;
    end
    if (m_cmd_accept[0] && m_cmd_accept[1]) n_parallel++;
    if (m_req[0].cmd != CMD_IDLE && m_req[1].cmd != CMD_IDLE &&
        tgt_of(m_req[0].addr) == tgt_of(m_req[1].addr) && tgt_of(m_req[0].addr) < NS)
      n_contend++;
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NM; m++)
        if (m_req[m].cmd != CMD_IDLE && tgt_of(m_req[m].addr) == s && !m_cmd_accept[m] &&
            m_req[m].addr[20] == 1'b0 && holder[s] != m) begin
          if (s_locked[s]) n_lock_block++;
          else if (s_held[s]) n_burst_block++;
        end
    // who holds each target, as seen at the initiator ports
    for (int m = 0; m < NM; m++)
      if (m_cmd_accept[m] && tgt_of(m_req[m].addr) < NS && m_req[m].addr[20] == 1'b0)
        holder[tgt_of(m_req[m].addr)] = m;
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      m_req[m] = '0; seqno[m] = 0; maxseq[m] = -1; owed[m] = 0; done_tx[m] = 0;
    end
    {n_single, n_mburst, n_sburst, n_lock, n_lock_block, n_pipe, n_ooo} = '0;
    {n_err, n_stall, n_contend, n_parallel, n_burst_block} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      initiator(0);
      initiator(1);
    join
    wait (owed[0] == 0 && owed[1] == 0);
    repeat (5) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (!m_idle[m]) begin failures++; $display("FAIL m%0d port not idle at end", m); end
    end
    $display("mechanisms: single=%0d mreq_burst=%0d sreq_burst=%0d lock=%0d lock_block=%0d burst_block=%0d",
             n_single, n_mburst, n_sburst, n_lock, n_lock_block, n_burst_block);
    $display("            pipelined=%0d out_of_order=%0d error=%0d stall=%0d contention=%0d parallel=%0d cycles=%0d",
             n_pipe, n_ooo, n_err, n_stall, n_contend, n_parallel, cyc);
    begin
      int mech [12];
      mech = '{n_single, n_mburst, n_sburst, n_lock, n_lock_block, n_burst_block,
                        n_pipe, n_ooo, n_err, n_stall, n_contend, n_parallel};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
