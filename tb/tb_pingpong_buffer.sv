// tb_pingpong_buffer: the two-frame buffer at depth 8. Fills frame A, swaps,
// reads A back in order while frame B fills, checks overflow at the depth,
// the veto's clear of the fill side, and that words left unread at a swap
// are discarded and reported.
module tb_pingpong_buffer;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic swap = 0, clear_fill = 0, wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic rd_empty, fill_full, overflow, unread_lost;
  logic [$clog2(D):0] fill_count;
  pingpong_buffer #(.DEPTH(D)) dut (.clk, .rst_n, .swap, .clear_fill, .wr_en, .wr_data,
    .rd_en, .rd_data, .rd_empty, .fill_full, .fill_count, .overflow, .unread_lost);

  int n_ovf = 0, n_lost = 0;
  always @(posedge clk) if (rst_n) begin if (overflow) n_ovf++; if (unread_lost) n_lost++; end

  task automatic write(input logic [31:0] w);
    @(negedge clk) begin wr_en = 1; wr_data = w; end
    @(negedge clk) wr_en = 0;
  endtask
  task automatic do_swap(); @(negedge clk) swap = 1; @(negedge clk) swap = 0; endtask
  task automatic read_check(input logic [31:0] w, input string what);
    @(negedge clk);
    check(!rd_empty && rd_data == w, what);
    rd_en = 1; @(negedge clk) rd_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(rd_empty && fill_count == 0, "empty after reset");
    for (int i = 0; i < 5; i++) write(32'hA000_0000 + 32'(i));
    check(fill_count == 5 && rd_empty, "frame A filling, read side empty");
    do_swap();
    check(fill_count == 0 && !rd_empty, "swap: A readable, new fill side empty");
    // read A while B fills
    for (int i = 0; i < 5; i++) begin
      write(32'hB000_0000 + 32'(i));
      read_check(32'hA000_0000 + 32'(i), $sformatf("frame A word %0d", i));
    end
    check(rd_empty, "frame A fully read");
    // fill B to the depth and beyond
    for (int i = 5; i < D + 3; i++) write(32'hB000_0000 + 32'(i));
    check(fill_full && n_ovf == 3, "three writes beyond the depth overflow");
    do_swap();
    for (int i = 0; i < 3; i++) read_check(32'hB000_0000 + 32'(i), $sformatf("frame B word %0d", i));
    check(n_lost == 0, "no loss so far");
    // veto clears the fill side
    write(32'hC0); write(32'hC1);
    @(negedge clk) clear_fill = 1; @(negedge clk) clear_fill = 0;
    check(fill_count == 0 && !rd_empty, "veto clears fill side only");
    write(32'hC2);
    do_swap();   // B still has 5 unread words: discarded
    check(n_lost == 1, "unread words at swap reported");
    read_check(32'hC2, "frame C holds only the word after the veto");
    @(negedge clk) check(rd_empty, "frame C then empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
