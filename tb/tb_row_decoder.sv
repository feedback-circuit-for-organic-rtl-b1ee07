// tb_row_decoder - exhaustive self-checking test of row_decoder.
module tb_row_decoder;
  localparam int ROWS = 5;
  logic en, sel_all;
  logic [2:0] row_no;
  logic [ROWS-1:0] row_sel, exp;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(ROWS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int e = 0; e < 2; e++)
        for (int r = 0; r < 8; r++) begin
          sel_all = a[0]; en = e[0]; row_no = 3'(r);
          #1;
          if (a == 1) exp = 5'b11111;
          else if (e == 1 && r >= 1 && r <= ROWS) exp = 5'(1 << (r - 1));
          else exp = 5'b00000;
          checks++;
          if (row_sel !== exp) begin
            failures++;
            $display("FAIL sel_all=%0d en=%0d row=%0d: %b vs %b", a, e, r, row_sel, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
