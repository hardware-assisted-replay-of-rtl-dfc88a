// tb_replay_controller: checks group-by-group playback.
// A stream of records in random groups (no CPU twice in a group; single
// record groups as in a total-order log, and larger slices) is offered with
// random gaps. CPU models finish a started run after a random time and
// report done. The testbench checks that the starts appear in record order
// with the right CPU and IC-delta, that no record of a group is started
// before every CPU of the previous group has reported done, that the CPUs of
// a group run concurrently, and that the group count is right.
module tb_replay_controller;
  import logger_pkg::*;
  localparam int NCPU = 16, NREC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     rec_valid = 0, rec_ready, start, done = 0, err;
  log_rec_t rec;
  cpu_t     start_cpu, done_cpu = '0;
  delta_t   start_count;
  logic [NCPU-1:0] running;
  logic [31:0]     groups;

  replay_controller #(.NCPU(NCPU)) dut (
    .clk, .rst_n, .enable_i(1'b1), .rec_valid_i(rec_valid), .rec_i(rec), .rec_ready_o(rec_ready),
    .start_o(start), .start_cpu_o(start_cpu), .start_count_o(start_count),
    .done_i(done), .done_cpu_i(done_cpu), .running_o(running), .groups_o(groups), .err_o(err)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  log_rec_t recs [NREC];
  int       grp  [NREC];
  int       n_groups = 0, n_start = 0, max_par = 0;
  int       busy_until [NCPU];   // cycle at which a running CPU reports done, -1 idle
  int       cur_group_done [int];
  int       outstanding = 0, cycle = 0, last_started_group = -1;

  // CPU models: report done (one per cycle) when the run is over
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
  end
  always @(negedge clk) begin
    done = 0;
    for (int c = 0; c < NCPU; c++)
      if (!done && busy_until[c] >= 0 && cycle >= busy_until[c]) begin
        done = 1; done_cpu = cpu_t'(c); busy_until[c] = -1; outstanding--;
      end
  end

  // start monitor
  always @(posedge clk) if (rst_n && start) begin
    int g;
    check(n_start < NREC, "too many starts");
    check(start_cpu == recs[n_start].cpu && start_count == recs[n_start].delta,
          $sformatf("start %0d: cpu %0d count %0d", n_start, start_cpu, start_count));
    g = grp[n_start];
    if (g != last_started_group) begin
      check(outstanding == 0, $sformatf("group %0d started while %0d CPUs still run", g, outstanding));
      last_started_group = g;
    end
    check(busy_until[start_cpu] < 0, "CPU started twice");
    busy_until[start_cpu] = cycle + 2 + $urandom_range(0, 10) + int'(start_count % 8);
    outstanding++;
    if (outstanding > max_par) max_par = outstanding;
    n_start++;
  end

  initial begin
    // build groups
    int i = 0;
    for (int c = 0; c < NCPU; c++) busy_until[c] = -1;
    while (i < NREC) begin
      int sz = ($urandom_range(0, 2) == 0) ? 1 : $urandom_range(1, 6);
      bit used [NCPU];
      for (int c = 0; c < NCPU; c++) used[c] = 0;
      for (int k = 0; k < sz && i < NREC; k++) begin
        int c;
        do c = $urandom_range(0, NCPU - 1); while (used[c]);
        used[c] = 1;
        recs[i] = '{cpu: cpu_t'(c), delta: delta_t'($urandom_range(0, 4095)), last: 1'b0};
        grp[i] = n_groups;
        i++;
      end
      recs[i - 1].last = 1;
      n_groups++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NREC; r++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      rec = recs[r]; rec_valid = 1;
      @(posedge clk);
      while (!rec_ready) @(posedge clk);
      #1 rec_valid = 0;
    end
    wait (outstanding == 0);
    repeat (5) @(negedge clk);
    check(n_start == NREC, $sformatf("%0d starts for %0d records", n_start, NREC));
    check(int'(groups) == n_groups, $sformatf("%0d groups counted, %0d sent", groups, n_groups));
    check(!err, "error flag");
    check(max_par > 1, "no group ran CPUs concurrently");
    $display("records=%0d groups=%0d max_parallel=%0d", n_start, groups, max_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
