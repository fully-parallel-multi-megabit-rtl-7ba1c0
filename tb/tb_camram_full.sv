// tb_camram_full: end-to-end self-checking test of camram_top at its default parameters, the 1 Mb
// configuration (b = 32, C = 32, y = 128, r = 3, 128-input resolver).
//
// A reference model of the memory (PRAM table, overflow counts, valid
// entries and all page words) predicts every response when its request is
// accepted. The stimulus is a random stream of INSERT, SEARCH, READ and
// WRITE requests with gaps, issued back to back whenever the memory is
// ready, and a PRAM that sends the keys to a few base classes so that
// classes fill and overflow. Then come: rewrites of the PRAM while
// requests flow (including classes that overflow past the last class and
// wrap to class 0), TEST mode use of a class row as a plain RAM, and a
// directed SEARCH followed by READs that must take o + n + 1 cycles.
// Every response is checked for its fields and for its latency (o + 1
// cycles for a SEARCH with o overflows). Each mechanism of the design is
// counted, and one that never happened counts as a failure.
module tb_camram_full;
  import cam_pkg::*;
  localparam int unsigned B       = 32;
  localparam int unsigned C       = 32;
  localparam int unsigned Y       = 128;
  localparam int unsigned R       = 3;
  localparam int unsigned PRAM_AW = 6;
  localparam int unsigned CW      = $clog2(C);
  localparam int unsigned YW      = $clog2(Y);
  localparam int unsigned NW      = 1 << R;
  localparam int          NOPS    = 6000;

  logic               clk = 1'b0;
  logic               rst_n, test_mode;
  logic               req_valid, req_ready;
  op_e                req_op;
  logic [B-1:0]       req_data;
  logic [R-1:0]       req_off;
  logic [CW-1:0]      req_tcls;
  logic [YW-1:0]      req_tpage;
  logic               pram_we;
  logic [PRAM_AW-1:0] pram_waddr;
  logic [CW-1:0]      pram_wclass;
  logic               rsp_valid, rsp_hit;
  op_e                rsp_op;
  logic [B-1:0]       rsp_data;
  logic [CW-1:0]      rsp_cls, rsp_base;
  logic [YW-1:0]      rsp_page;
  logic [1:0]         rsp_ovf;

  camram_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [CW-1:0] m_pram  [2**PRAM_AW];
  logic [1:0]    m_cnt   [C];
  bit            m_valid [C][Y];
  logic [B-1:0]  m_word  [C][Y][NW];
  bit            m_known [C][Y][NW];
  bit            m_rv;
  int            m_rc, m_rp;
  bit            inserted [logic [B-1:0]];

  typedef struct {
    op_e          op;
    bit           hit;
    logic [B-1:0] data;
    bit           data_known;
    int           cls, page, base, ovf, steps;
    bit           loc_known;
    longint       acc_cycle;
  } exp_t;
  exp_t expq [$];

  int     checks = 0, failures = 0;
  longint cycle = 0;
  int ev_hit0, ev_hit_ovf, ev_miss_ovf, ev_ins_ovf, ev_ins_fail, ev_stall, ev_b2b,
      ev_test, ev_pram_rw, ev_multi, ev_refused, ev_wrap, ev_o_n_1;

  always @(posedge clk) cycle++;

  function automatic exp_t model(input op_e op, input logic [B-1:0] data, input int off,
                                 input bit tm, input int tcls, input int tpage);
    exp_t e;
    int base, c, found, nmatch;
    e = '{op: op, hit: 0, data: '0, data_known: 0, cls: 0, page: 0, base: 0, ovf: 0,
          steps: 1, loc_known: 0, acc_cycle: 0};
    base = int'(m_pram[data[PRAM_AW-1:0]]);
    e.base = base;
    case (op)
      OP_SEARCH: begin
        found = -1;
        for (int k = 0; k <= int'(m_cnt[base]); k++) begin
          c = (base + k) % C;
          nmatch = 0;
          for (int p = Y - 1; p >= 0; p--)
            if (m_valid[c][p] && m_known[c][p][0] && m_word[c][p][0] == data) begin
              found = p; nmatch++;
            end
          e.ovf = k; e.steps = k + 1; e.cls = c;
          if (found >= 0) begin
            if (nmatch > 1) ev_multi++;
            if (base + k >= int'(C)) ev_wrap++;
            break;
          end
        end
        e.hit = found >= 0;
        m_rv = e.hit;
        if (e.hit) begin
          m_rc = e.cls; m_rp = found; e.page = found; e.loc_known = 1;
          if (e.ovf == 0) ev_hit0++; else ev_hit_ovf++;
        end else if (m_cnt[base] != 0) ev_miss_ovf++;
      end
      OP_INSERT: begin
        found = -1;
        for (int k = int'(m_cnt[base]); k <= 3; k++) begin
          c = (base + k) % C;
          for (int p = Y - 1; p >= 0; p--) if (!m_valid[c][p]) found = p;
          e.ovf = k; e.steps = k - int'(m_cnt[base]) + 1; e.cls = c;
          if (found >= 0) break;
        end
        e.hit = found >= 0;
        m_rv = e.hit;
        if (e.hit) begin
          m_valid[e.cls][found] = 1;
          m_word[e.cls][found][0] = data;
          m_known[e.cls][found][0] = 1;
          if (e.ovf > 0) ev_ins_ovf++;
          if (base + e.ovf >= int'(C)) ev_wrap++;
          m_cnt[base] = 2'(e.ovf);
          m_rc = e.cls; m_rp = found; e.page = found; e.loc_known = 1;
          inserted[data] = 1;
        end else ev_ins_fail++;
      end
      OP_READ, OP_WRITE: begin
        if (tm) begin
          c = tcls; found = tpage; ev_test++;
        end else begin
          c = m_rc; found = m_rp;
        end
        e.hit = tm || m_rv;
        if (!e.hit) ev_refused++;
        if (e.hit) begin
          e.cls = c; e.page = found; e.loc_known = 1;
          if (op == OP_READ) begin
            e.data = m_word[c][found][off];
            e.data_known = m_known[c][found][off];
          end else begin
            m_word[c][found][off] = data;
            m_known[c][found][off] = 1;
          end
        end
      end
      default: ;
    endcase
    return e;
  endfunction

  task automatic check_rsp();
    exp_t e;
    if (!rsp_valid) return;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL response with nothing outstanding");
      return;
    end
    e = expq.pop_front();
    if (rsp_op != e.op || rsp_hit != e.hit ||
        (e.data_known && rsp_data != e.data) ||
        (e.loc_known && (int'(rsp_cls) != e.cls || int'(rsp_page) != e.page)) ||
        ((e.op == OP_SEARCH || e.op == OP_INSERT) &&
         (int'(rsp_base) != e.base || int'(rsp_ovf) != e.ovf)) ||
        (cycle - e.acc_cycle != longint'(e.steps))) begin
      failures++;
      $display("FAIL %s: hit %0b/%0b data %h/%h cls %0d/%0d page %0d/%0d base %0d/%0d ovf %0d/%0d cycles %0d/%0d",
               e.op.name(), rsp_hit, e.hit, rsp_data, e.data, rsp_cls, e.cls, rsp_page, e.page,
               rsp_base, e.base, rsp_ovf, e.ovf, cycle - e.acc_cycle, e.steps);
    end
  endtask

  // One clock cycle: at the falling edge check the response of the last
  // rising edge, present the new request, and if it will be accepted at
  // the coming edge, predict its response.
  op_e last_acc_op = OP_NOP;
  bit  last_acc    = 0;
  task automatic tick(input bit v, input op_e op, input logic [B-1:0] d, input int off,
                      input int tcls, input int tpage, output bit accepted);
    exp_t e;
    req_valid = v; req_op = op; req_data = d; req_off = R'(off);
    req_tcls = CW'(tcls); req_tpage = YW'(tpage);
    #1;
    accepted = v && req_ready;
    if (v && !req_ready) ev_stall++;
    if (accepted) begin
      e = model(op, d, off, test_mode, tcls, tpage);
      e.acc_cycle = cycle + 1;
      expq.push_back(e);
      if (last_acc && last_acc_op == OP_READ && op == OP_SEARCH) ev_b2b++;
    end
    last_acc = accepted;
    if (accepted) last_acc_op = op;
    if (pram_we) begin
      m_pram[pram_waddr] = pram_wclass;
      ev_pram_rw++;
    end
    @(negedge clk);
    pram_we = 0;
    check_rsp();
  endtask

  // Issue one request, holding it until it is accepted.
  task automatic issue(input op_e op, input logic [B-1:0] d, input int off,
                       input int tcls = 0, input int tpage = 0);
    bit acc;
    do tick(1'b1, op, d, off, tcls, tpage, acc); while (!acc);
  endtask

  task automatic drain();
    bit acc;
    while (expq.size() != 0) tick(1'b0, OP_NOP, '0, 0, 0, 0, acc);
    tick(1'b0, OP_NOP, '0, 0, 0, 0, acc);
  endtask

  function automatic logic [B-1:0] rand_word();
    logic [B-1:0] w;
    w = '0;
    for (int i = 0; i < int'(B); i += 32) w = (w << 32) | B'($urandom);
    return w;
  endfunction

  function automatic logic [B-1:0] some_key();
    logic [B-1:0] keys [$];
    int n;
    n = 0;
    foreach (inserted[k]) if (($urandom % 8) == 0 && n < 16) begin keys.push_back(k); n++; end
    if (keys.size() == 0) return rand_word();
    return keys[$urandom % keys.size()];
  endfunction

  task automatic random_phase(input int nops);
    logic [B-1:0] d;
    int r, off, tries;
    bit acc;
    for (int n = 0; n < nops; n++) begin
      if (($urandom % 8) == 0) begin
        tick(1'b0, OP_NOP, '0, 0, 0, 0, acc);
        continue;
      end
      r = $urandom % 100;
      off = (($urandom % 10) == 0) ? 0 : 1 + ($urandom % (NW - 1));
      if (r < 33) begin
        tries = 0;
        do begin d = rand_word(); tries++; end while (inserted.exists(d) && tries < 20);
        issue(OP_INSERT, d, 0);
      end else if (r < 36) issue(OP_INSERT, some_key(), 0);
      else if (r < 61) issue(OP_SEARCH, some_key(), 0);
      else if (r < 70) issue(OP_SEARCH, rand_word(), 0);
      else if (r < 85) issue(OP_READ, rand_word(), off);
      else issue(OP_WRITE, rand_word(), off);
    end
  endtask

  initial begin
    bit acc;
    longint t0;
    int o;
    logic [B-1:0] k;
    rst_n = 0; test_mode = 0; req_valid = 0; req_op = OP_NOP; req_data = '0; req_off = '0;
    req_tcls = '0; req_tpage = '0; pram_we = 0; pram_waddr = '0; pram_wclass = '0;
    for (int c = 0; c < int'(C); c++) begin
      m_cnt[c] = 0;
      for (int p = 0; p < int'(Y); p++) begin
        m_valid[c][p] = 0;
        for (int w = 0; w < int'(NW); w++) m_known[c][p][w] = 0;
      end
    end
    m_rv = 0; m_rc = 0; m_rp = 0;
    #12 rst_n = 1;
    @(negedge clk);

    // program the PRAM: keys go to base classes 2, 5 and 8
    for (int a = 0; a < 2**PRAM_AW; a++) begin
      pram_we = 1; pram_waddr = PRAM_AW'(a); pram_wclass = CW'((a % 3) * 3 + 2);
      tick(1'b0, OP_NOP, '0, 0, 0, 0, acc);
    end
    ev_pram_rw = 0;

    random_phase(NOPS);

    // rewrite PRAM entries while requests flow: some keys now go to the
    // last class, whose overflows wrap to class 0
    for (int n = 0; n < NOPS / 2; n++) begin
      if (n % 4 == 0) begin
        pram_we = 1; pram_waddr = PRAM_AW'($urandom);
        pram_wclass = (n % 8 == 0) ? CW'(C - 1) : CW'($urandom);
      end
      random_phase(1);
    end
    drain();

    // directed: SEARCH with o overflows followed by n = 3 READs takes
    // o + n + 1 cycles from its acceptance to the last response
    k = '0;
    foreach (inserted[kk]) begin
      exp_t e0;
      e0 = model(OP_SEARCH, kk, 0, 0, 0, 0);  // probe the model only
      if (e0.hit && e0.ovf > 0) begin k = kk; break; end
    end
    issue(OP_SEARCH, k, 0);
    t0 = expq[$].acc_cycle;  // acceptance edge
    o = expq[$].ovf;
    for (int n = 0; n < 3; n++) issue(OP_READ, '0, 1 + n % (NW - 1));
    drain();
    // the last READ's response came o + 3 + 1 cycles after the SEARCH was accepted
    checks++;
    if (o > 0 && last_rsp_cycle - t0 == longint'(o + 3 + 1)) ev_o_n_1++;
    else begin
      failures++;
      $display("FAIL o+n+1: o=%0d took %0d cycles", o, last_rsp_cycle - t0);
    end

    // TEST mode: use class C-1 row as a plain RAM of Y * 2^r words
    test_mode = 1;
    for (int p = 0; p < int'(Y); p++)
      for (int w = 0; w < int'(NW); w++) issue(OP_WRITE, rand_word(), w, C - 1, p);
    for (int p = 0; p < int'(Y); p++)
      for (int w = 0; w < int'(NW); w++) issue(OP_READ, '0, w, C - 1, p);
    for (int n = 0; n < 200; n++) issue(OP_READ, '0, $urandom % NW, $urandom % C, $urandom % Y);
    drain();
    test_mode = 0;
    random_phase(50);
    drain();

    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d responses missing", expq.size()); end
    $display("events: hit0=%0d hit_ovf=%0d miss_ovf=%0d ins_ovf=%0d ins_fail=%0d stall=%0d read_then_search=%0d test=%0d pram_rewrite=%0d multi=%0d refused=%0d wrap=%0d o_n_1=%0d",
             ev_hit0, ev_hit_ovf, ev_miss_ovf, ev_ins_ovf, ev_ins_fail, ev_stall, ev_b2b, ev_test,
             ev_pram_rw, ev_multi, ev_refused, ev_wrap, ev_o_n_1);
    foreach (ev_names[i]) begin
      checks++;
      if (ev_counts(i) == 0) begin failures++; $display("FAIL mechanism never happened: %s", ev_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint last_rsp_cycle = 0;
  always @(negedge clk) if (rsp_valid) last_rsp_cycle = cycle;

  string ev_names [13] = '{"search hit in base class", "search hit in overflow class",
    "true miss after overflow classes", "insert into overflow class", "insert fails (classes full)",
    "stall", "READ then SEARCH back to back", "TEST mode access", "PRAM rewrite during operation",
    "multiple match resolved", "READ/WRITE without responder", "overflow wraps past last class",
    "o+n+1 throughput"};
  function automatic int ev_counts(input int i);
    case (i)
      0: return ev_hit0;      1: return ev_hit_ovf;  2: return ev_miss_ovf;
      3: return ev_ins_ovf;   4: return ev_ins_fail; 5: return ev_stall;
      6: return ev_b2b;       7: return ev_test;     8: return ev_pram_rw;
      9: return ev_multi;    10: return ev_refused; 11: return ev_wrap;
      default: return ev_o_n_1;
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
