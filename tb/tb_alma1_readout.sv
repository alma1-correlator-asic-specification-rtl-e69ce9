// tb_alma1_readout -- self-checking test of the readout pin logic.
// Checks that SEL and RDCLKENBL appear on sel_p/rd_en one clock later, that
// OUT follows the results bus one clock later, and the output enable for
// all combinations of XOE\, YOE\ and HIZ.
module tb_alma1_readout;
  logic        clk = 1'b0;
  logic [5:0]  sel, sel_p;
  logic        rdclkenbl, xoe_n, yoe_n, hiz, rd_en, out_oe;
  logic [15:0] rd_bus, out;
  int          checks = 0, failures = 0;

  alma1_readout dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0]  s_prev;
    logic        r_prev;
    logic [15:0] b_prev;
    sel = 0; rdclkenbl = 0; rd_bus = 0; xoe_n = 1; yoe_n = 1; hiz = 0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      s_prev = sel; r_prev = rdclkenbl; b_prev = rd_bus;
      {xoe_n, yoe_n, hiz} = 3'(i);
      @(negedge clk);
      checks++;
      if (sel_p !== s_prev || rd_en !== r_prev || out !== b_prev) begin
        failures++;
        $display("FAIL pipeline at %0d", i);
      end
      checks++;
      if (out_oe !== (!xoe_n && !yoe_n && !hiz)) begin
        failures++;
        $display("FAIL out_oe x=%b y=%b hiz=%b", xoe_n, yoe_n, hiz);
      end
      sel = 6'($urandom); rdclkenbl = 1'($urandom); rd_bus = 16'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
