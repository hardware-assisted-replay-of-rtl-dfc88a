// page_status_table: one bit per physical page, 1 = sharable.
//
// Every address seen on the bus is looked up here; references to a page whose
// bit is 0 (private data, instruction fetches) are not logged. The operating
// system keeps the table current through the write port as it manages virtual
// memory. One bit per page follows the document; the page count (2^PAGE_AW,
// 4 KB pages of a 32-bit address space) and the timing are this design's
// choices.
//
// Timing: lookup is synchronous, shared_o is valid the cycle after lookup_i.
// A write and a lookup of the same page in one cycle return the old bit.
// The table is cleared by nothing but the OS: after power-up the OS must write
// every page it wants to be sharable, and clear the others (clear_i clears all
// bits over 2^PAGE_AW cycles, busy_o high meanwhile; lookups return 0 then).
module page_status_table #(
  parameter int unsigned PAGE_AW = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  // OS port
  input  logic               wr_en_i,
  input  logic [PAGE_AW-1:0] wr_page_i,
  input  logic               wr_shared_i,
  input  logic               clear_i,
  output logic               busy_o,
  // bus lookup port
  input  logic               lookup_i,
  input  logic [PAGE_AW-1:0] lookup_page_i,
  output logic               shared_o
);

  logic               bits [2**PAGE_AW];
  logic               clearing;
  logic [PAGE_AW-1:0] clr_ptr;

  assign busy_o = clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_ptr  <= '0;
    end else if (clear_i) begin
      clearing <= 1'b1;
      clr_ptr  <= '0;
    end else if (clearing) begin
      clr_ptr <= clr_ptr + 1'b1;
      if (clr_ptr == '1) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)      bits[clr_ptr]   <= 1'b0;
    else if (wr_en_i)  bits[wr_page_i] <= wr_shared_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        shared_o <= 1'b0;
    else if (lookup_i) shared_o <= clearing ? 1'b0 : bits[lookup_page_i];
  end

endmodule
