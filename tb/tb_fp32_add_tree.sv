// tb_fp32_add_tree: feeds a new random operand vector every enabled cycle into
// trees of 81 (the default, 9x9 window) and 9 operands and checks each sum
// against the reference pairwise sum exactly LEVELS enabled cycles later
// (7 and 4 levels), with random disabled cycles in between.
module tb_fp32_add_tree;
  import stencil_pkg::*;
  import fp32_ref_pkg::*;

  logic clk = 1'b0;
  logic en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t x81 [81];
  fp32_t x9  [9];
  fp32_t y81, y9;

  fp32_add_tree #(.N(81)) dut81 (.clk, .en, .x(x81), .y(y81));
  fp32_add_tree #(.N(9))  dut9  (.clk, .en, .x(x9),  .y(y9));

  initial begin
    fp32_t q81[$], q9[$];
    int    nen;
    logic [31:0] v[];
    en = 1'b0;
    nen = 0;
    if (tree_levels(81) != 7 || tree_levels(9) != 4) begin
      failures++;
      $display("tree depth wrong");
    end
    checks++;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      v = new[81];
      for (int n = 0; n < 81; n++) begin x81[n] = rand_val(); v[n] = x81[n]; end
      if (en) q81.push_back(tree_sum(v));
      v = new[9];
      for (int n = 0; n < 9; n++) begin x9[n] = rand_val(); v[n] = x9[n]; end
      if (en) q9.push_back(tree_sum(v));
      @(posedge clk);
      #1;
      if (en) begin
        nen++;
        if (nen >= 7) begin
          checks++;
          if (!same(y81, q81[nen-7])) begin
            failures++;
            if (failures < 10) $display("N=81 sum %0d: %h expected %h", nen-7, y81, q81[nen-7]);
          end
        end
        if (nen >= 4) begin
          checks++;
          if (!same(y9, q9[nen-4])) begin
            failures++;
            if (failures < 10) $display("N=9 sum %0d: %h expected %h", nen-4, y9, q9[nen-4]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
