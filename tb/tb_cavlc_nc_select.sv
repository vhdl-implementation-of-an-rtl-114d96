// tb_cavlc_nc_select: exhaustive check of the coeff_token table selector.
// Every neighbour count 0..16 for both neighbours, every availability combination,
// with and without chroma DC; nC and the table are recomputed here with division.
`timescale 1ns/1ps
module tb_cavlc_nc_select;
  import cavlc_pkg::*;
  logic [4:0] nu, nl, nc;
  logic nu_avail, nl_avail, chroma_dc;
  ct_table_e tbl;
  int checks = 0, failures = 0;

  cavlc_nc_select dut (.*);

  initial begin
    for (int u = 0; u <= 16; u++)
      for (int l = 0; l <= 16; l++)
        for (int a = 0; a < 8; a++) begin
          int enc, et;
          nu = 5'(u); nl = 5'(l); nu_avail = a[0]; nl_avail = a[1]; chroma_dc = a[2];
          #1;
          if (a[0] && a[1]) enc = int'($floor((u + l) / 2.0 + 0.5));
          else if (a[0])    enc = u;
          else if (a[1])    enc = l;
          else              enc = 0;
          et = a[2] ? 4 : (enc <= 1) ? 0 : (enc <= 3) ? 1 : (enc <= 7) ? 2 : 3;
          checks++;
          if (int'(tbl) != et || int'(nc) != enc) begin
            failures++;
            if (failures < 10) $display("FAIL u=%0d l=%0d a=%0d nc=%0d/%0d tbl=%0d/%0d", u, l, a, nc, enc, tbl, et);
          end
        end
    // the waveform example: nC = 5 uses the 4 <= nC < 8 table
    nu = 5; nl = 5; nu_avail = 1; nl_avail = 1; chroma_dc = 0; #1;
    checks++; if (nc != 5 || tbl != TBL_NC4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
