// tb_shakan_me: writes random instructions into a memory element, reads them
// back one cycle after the address (synchronous read), checks that a read
// without rd_en holds the previous output, and that reading and writing in
// the same cycle returns the old word.
module tb_shakan_me;
  import shakan_pkg::*;

  localparam int DEPTH = 512;
  logic               clk = 0;
  logic               rd_en, wr_en;
  logic [CHILD_W-1:0] rd_addr, wr_addr;
  logic [INSTR_W-1:0] rd_data, wr_data;
  logic [INSTR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  shakan_me #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    repeat (2000) begin
      logic [INSTR_W-1:0] prev_data;
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      rd_en = 1; rd_addr = 10'(a);
      if ($urandom_range(0, 3) == 0) begin
        wr_en = 1; wr_addr = 10'(a); wr_data = {$urandom, $urandom};
      end
      @(negedge clk);
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rd_data, model[a]);
      end
      if (wr_en) model[a] = wr_data;
      wr_en = 0;
      // no read: output holds
      prev_data = rd_data;
      rd_en = 0; rd_addr = 10'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      checks++;
      if (rd_data !== prev_data) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
