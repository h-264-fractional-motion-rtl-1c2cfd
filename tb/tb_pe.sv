// tb_pe: drives one processing element (P = 2) with random reference and
// current pixels and lane enables, and checks after every cycle that the
// accumulator equals the loaded cost plus the sum of enabled absolute
// differences, computed here independently. Re-initialisation is exercised
// between runs.
module tb_pe;
  import fme_pkg::*;

  localparam int P = 2;
  logic clk = 1'b0, init = 1'b0;
  cost_t init_cost = '0, sad;
  pix_t ref_pix [P], cur_pix [P];
  logic en [P];
  int checks = 0, failures = 0;
  longint model;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int l = 0; l < P; l++) begin ref_pix[l] = '0; cur_pix[l] = '0; en[l] = 1'b0; end
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      init = 1'b1;
      init_cost = cost_t'($urandom_range(0, 100000));
      model = longint'(init_cost);
      // inputs during init are ignored
      for (int l = 0; l < P; l++) begin ref_pix[l] = 8'd200; cur_pix[l] = 8'd0; en[l] = 1'b1; end
      @(negedge clk);
      init = 1'b0;
      checks++;
      if (longint'(sad) != model) begin failures++; $display("FAIL: init value %0d", sad); end
      for (int t = 0; t < 60; t++) begin
        for (int l = 0; l < P; l++) begin
          ref_pix[l] = pix_t'($urandom_range(0, 255));
          cur_pix[l] = pix_t'($urandom_range(0, 255));
          en[l] = ($urandom_range(0, 3) != 0);
          if (en[l]) model += (ref_pix[l] > cur_pix[l]) ? longint'(ref_pix[l]) - longint'(cur_pix[l])
                                                       : longint'(cur_pix[l]) - longint'(ref_pix[l]);
        end
        @(negedge clk);
        checks++;
        if (longint'(sad) != model) begin
          failures++; $display("FAIL: run %0d step %0d sad %0d expected %0d", run, t, sad, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
