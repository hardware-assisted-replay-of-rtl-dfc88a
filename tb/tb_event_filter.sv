// tb_event_filter: checks the classification of snooped bus transactions.
// A small page table model answers the filter's lookups one cycle later, as
// the real table does. Random transactions of every type, on sharable,
// private and logger pages, with and without an overlapped write-update, are
// checked one cycle later against the rules: READ, READ-MODIFY, INVALIDATE on
// sharable pages are logged (modify set except for READ); write-backs there
// go out marked as write-backs; an INVALIDATE in the logger page is a pseudo
// event whatever the table says; a write-update owner appears as a separate
// write-back event for a read miss on a sharable page; all else is dropped.
module tb_event_filter;
  import logger_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    bus_valid = 0, wu_valid = 0;
  bus_tx_t tx;
  cpu_t    wu_cpu;
  logic    pst_lookup, pst_shared;
  logic [PAGE_W-1:0] pst_page;
  logic    wb_valid, ev_valid, ps_valid;
  event_t  wb_ev, ev;
  cpu_t    ps_cpu;
  int checks = 0, failures = 0;
  int n_log = 0, n_wb = 0, n_ps = 0, n_drop = 0, n_wu = 0;

  event_filter dut (
    .clk, .rst_n, .bus_valid_i(bus_valid), .bus_tx_i(tx), .bus_wu_valid_i(wu_valid),
    .bus_wu_cpu_i(wu_cpu), .pst_lookup_o(pst_lookup), .pst_page_o(pst_page),
    .pst_shared_i(pst_shared), .wb_valid_o(wb_valid), .wb_ev_o(wb_ev),
    .ev_valid_o(ev_valid), .ev_o(ev), .pseudo_valid_o(ps_valid), .pseudo_cpu_o(ps_cpu)
  );

  // page table model: even pages below 16 are sharable
  function automatic bit sharable(logic [PAGE_W-1:0] p);
    return (p < 16) && !p[0];
  endfunction
  always_ff @(posedge clk) pst_shared <= pst_lookup && sharable(pst_page);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    tx = '0; wu_cpu = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bus_tx_t t;
      bit      v, w, sh, lp, is_wb, is_log, exp_ev, exp_wb, exp_ps;
      cpu_t    wc;
      int      r;
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      t.cpu   = cpu_t'($urandom_range(0, 15));
      t.op    = bus_op_e'($urandom_range(0, 4));
      t.delta = delta_t'($urandom_range(0, 4095));
      r = $urandom_range(0, 9);
      if (r < 2) t.addr = {LOGGER_PAGE, 12'($urandom_range(0, 4095))};
      else       t.addr = {20'($urandom_range(0, 31)), 12'($urandom_range(0, 4095))};
      w  = ($urandom_range(0, 3) == 0);
      wc = cpu_t'($urandom_range(0, 15));
      bus_valid = v; tx = t; wu_valid = w; wu_cpu = wc;
      // expected, worked out from the rules
      lp     = (t.addr[31:12] == LOGGER_PAGE);
      sh     = sharable(t.addr[31:12]);
      is_wb  = (t.op == BUS_WRITE_REPLACE) || (t.op == BUS_WRITE_UPDATE);
      is_log = (t.op == BUS_READ) || (t.op == BUS_READ_MODIFY) || (t.op == BUS_INVALIDATE);
      exp_ps = v && lp && (t.op == BUS_INVALIDATE);
      exp_ev = exp_ps || (v && !lp && sh && (is_wb || is_log));
      exp_wb = v && w && !lp && sh && (t.op == BUS_READ || t.op == BUS_READ_MODIFY);
      @(negedge clk);
      bus_valid = 0; wu_valid = 0;
      check(ev_valid == exp_ev, $sformatf("tx %0d: ev_valid %0b expected %0b", i, ev_valid, exp_ev));
      check(wb_valid == exp_wb, $sformatf("tx %0d: wb_valid %0b expected %0b", i, wb_valid, exp_wb));
      check(ps_valid == exp_ps, $sformatf("tx %0d: pseudo %0b expected %0b", i, ps_valid, exp_ps));
      if (exp_ev) begin
        check(ev.cpu == t.cpu && ev.delta == t.delta && ev.line == t.addr[31:4],
              $sformatf("tx %0d: event fields", i));
        check(ev.pseudo == exp_ps, "pseudo flag");
        check(ev.writeback == (!exp_ps && is_wb), "writeback flag");
        check(ev.modify == (!exp_ps && t.op != BUS_READ), "modify flag");
        if (exp_ps) n_ps++; else if (is_wb) n_wb++; else n_log++;
      end else if (v) n_drop++;
      if (exp_wb) begin
        n_wu++;
        check(wb_ev.cpu == wc && wb_ev.writeback && wb_ev.modify && wb_ev.line == t.addr[31:4],
              "write-update event fields");
      end
      if (exp_ps) check(ps_cpu == t.cpu, "pseudo cpu");
    end
    check(n_log > 0 && n_wb > 0 && n_ps > 0 && n_drop > 0 && n_wu > 0, "not every class seen");
    $display("logged=%0d writebacks=%0d pseudo=%0d write-updates=%0d dropped=%0d",
             n_log, n_wb, n_ps, n_wu, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
