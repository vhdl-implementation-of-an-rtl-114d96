// tb_cavlc_stats_buffer: checks the two block statistics buffers.
// Random records are written when `space` allows (and sometimes in the same cycle as
// a pop) and popped at random; they must come out in order and unchanged. Checks
// full/rd_valid against a model count, that space is low whenever a write in this
// cycle would leave no room for a block started now, and that both entries were in
// use at once.
`timescale 1ns/1ps
module tb_cavlc_stats_buffer;
  import cavlc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, full, space, rd_valid, rd_pop = 0;
  blk_stats_t wr_data = '0, rd_data;

  cavlc_stats_buffer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  blk_stats_t model[$];
  int sent = 0, got = 0, both = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic blk_stats_t rnd();
    blk_stats_t r;
    for (int i = 0; i < $bits(r); i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    check(full == (model.size() == 2), "full");
    check(rd_valid == (model.size() != 0), "rd_valid");
    check(space == (model.size() == 0 || (model.size() == 1 && !wr_valid)), "space");
    if (model.size() == 2) both++;
    if (rd_valid) check(rd_data == model[0], "record order and content");
    if (rd_pop && rd_valid) begin void'(model.pop_front()); got++; end
    if (wr_valid) begin model.push_back(wr_data); sent++; end
    // next cycle's drive
    rd_pop <= ($urandom_range(0, 2) == 0);
    if ((model.size() < 2) && $urandom_range(0, 1) == 1 && sent < 3000) begin
      wr_valid <= 1'b1;
      wr_data  <= rnd();
    end else begin
      wr_valid <= 1'b0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (sent == 3000);
    repeat (40) @(posedge clk);
    check(got == sent, $sformatf("all records out (%0d of %0d)", got, sent));
    check(both > 0, "both entries used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
