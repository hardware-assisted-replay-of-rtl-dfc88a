// tb_page_status_table: checks the sharable-page bit table.
// After reset the table clears itself (busy high, lookups read 0); the test
// then writes a random pattern through the OS port, reads every page back
// with one cycle of latency against its own copy of the pattern, rewrites a
// few pages, and finally clears the table again and checks it reads all zero.
module tb_page_status_table;
  localparam int AW = 8, N = 2**AW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en = 0, wr_shared = 0, clear = 0, busy, lookup = 0, shared;
  logic [AW-1:0] wr_page = '0, lookup_page = '0;
  bit            model [N];
  int            checks = 0, failures = 0;

  page_status_table #(.PAGE_AW(AW)) dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_page_i(wr_page), .wr_shared_i(wr_shared),
    .clear_i(clear), .busy_o(busy), .lookup_i(lookup), .lookup_page_i(lookup_page),
    .shared_o(shared)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic read_all(string tag);
    for (int p = 0; p < N; p++) begin
      @(negedge clk);
      lookup = 1; lookup_page = AW'(p);
      @(negedge clk);
      lookup = 0;
      check(shared == model[p], $sformatf("%s: page %0d read %0b expected %0b", tag, p, shared, model[p]));
    end
  endtask

  initial begin
    for (int p = 0; p < N; p++) model[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(busy, "table not clearing after reset");
    // lookup during clearing returns 0
    lookup = 1; lookup_page = 8'd3;
    @(negedge clk); lookup = 0;
    check(!shared, "lookup during clear not 0");
    wait (!busy);
    // the clear takes one cycle per page
    read_all("after reset");
    for (int p = 0; p < N; p++) begin
      @(negedge clk);
      model[p] = $urandom_range(0, 1);
      wr_en = 1; wr_page = AW'(p); wr_shared = model[p];
    end
    @(negedge clk); wr_en = 0;
    read_all("pattern");
    // write and read the same page in one cycle: the old value is returned
    @(negedge clk);
    wr_en = 1; wr_page = 8'd7; wr_shared = !model[7];
    lookup = 1; lookup_page = 8'd7;
    @(negedge clk);
    wr_en = 0; lookup = 0;
    check(shared == model[7], "read-during-write did not return old value");
    model[7] = !model[7];
    read_all("after rewrite");
    // clear again, timing it
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    begin
      int t = 0;
      while (busy) begin @(negedge clk); t++; end
      check(t >= N - 2 && t <= N + 1, $sformatf("clear took %0d cycles for %0d pages", t, N));
    end
    for (int p = 0; p < N; p++) model[p] = 0;
    read_all("after clear");
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
