// tb_cpu_ic_unit: checks a CPU's instruction counter for logging and playback.
// Logging: a CPU model retires instructions at random whenever it is not held
// and issues transactions, some of which the logger logs; the IC-delta on
// each transaction is compared with the testbench's own count of instructions
// retired since the previous logged transaction. A long run without
// transactions must hold the CPU at 4095 instructions and request the
// delta-overflow pseudo-transaction; a delta request must raise the same
// request early. Playback: after a start with n instructions, the CPU must
// retire exactly n (n = 0 included) before it is held and reports done.
module tb_cpu_ic_unit;
  import logger_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   play = 0, retire = 0, tx_fire = 0, tx_counts = 0, hold, pseudo_req;
  logic   pseudo_fire = 0, dreq = 0, start = 0;
  delta_t delta, count = '0;

  cpu_ic_unit dut (
    .clk, .rst_n, .play_i(play), .retire_i(retire), .tx_fire_i(tx_fire),
    .tx_counts_i(tx_counts), .hold_o(hold), .delta_o(delta), .pseudo_req_o(pseudo_req),
    .pseudo_fire_i(pseudo_fire), .dreq_i(dreq), .play_start_i(start), .play_count_i(count)
  );

  int checks = 0, failures = 0, n_ovf = 0, n_dreq = 0, n_tx = 0, n_play = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int since;  // instructions retired since the last logged transaction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    since = 0;
    // logging with frequent transactions
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      retire = !hold && ($urandom_range(0, 3) != 0);
      tx_fire = ($urandom_range(0, 19) == 0);
      tx_counts = tx_fire && ($urandom_range(0, 2) != 0);
      pseudo_fire = 0;
      if (pseudo_req && !tx_fire && !retire) begin
        pseudo_fire = 1;
      end
      if (tx_fire) check(int'(delta) == since, $sformatf("tx delta %0d expected %0d", delta, since));
      if (pseudo_fire) check(int'(delta) == since, "pseudo delta");
      @(posedge clk);
      if (pseudo_fire) since = 0;
      else if (tx_fire && tx_counts) begin since = retire ? 1 : 0; n_tx++; end
      else if (retire) since++;
      #1;
    end
    // long stretch without transactions: overflow at 4095
    @(negedge clk);
    retire = 0; tx_fire = 0; pseudo_fire = 1;     // start from zero
    @(negedge clk);
    pseudo_fire = 0;
    since = 0;
    while (!hold) begin
      retire = 1;
      @(negedge clk);
      since++;
      retire = 0;
    end
    check(since == 4095, $sformatf("held after %0d instructions", since));
    check(pseudo_req && int'(delta) == 4095, "overflow pseudo-transaction not requested");
    n_ovf++;
    pseudo_fire = 1;
    @(negedge clk);
    pseudo_fire = 0;
    check(!hold && !pseudo_req && delta == 0, "counter not restarted after overflow");
    // delta request
    retire = 1; repeat (17) @(negedge clk); retire = 0;
    dreq = 1; @(negedge clk); dreq = 0;
    check(pseudo_req && !hold && delta == 17, "delta request not answered");
    n_dreq++;
    pseudo_fire = 1; @(negedge clk); pseudo_fire = 0;
    check(!pseudo_req, "request not cleared");
    // playback
    play = 1;
    @(negedge clk);
    check(hold, "not held before start in playback");
    for (int r = 0; r < 40; r++) begin
      int n = (r == 0) ? 0 : $urandom_range(0, 300);
      int got = 0;
      count = delta_t'(n); start = 1;
      @(negedge clk);
      start = 0;
      while (!hold) begin
        retire = ($urandom_range(0, 2) != 0);
        @(negedge clk);
        if (retire) got++;
        retire = 0;
      end
      check(got == n, $sformatf("playback ran %0d instructions, expected %0d", got, n));
      check(pseudo_req, "done not reported");
      pseudo_fire = 1; @(negedge clk); pseudo_fire = 0;
      check(hold && !pseudo_req, "not holding after done");
      n_play++;
    end
    $display("logged_tx=%0d overflows=%0d delta_requests=%0d playback_runs=%0d", n_tx, n_ovf, n_dreq, n_play);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
