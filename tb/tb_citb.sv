// tb_citb: writes random rows of the congestion information table, several
// at once, and compares the contents and the derived neighbour status with a
// model kept in the testbench. Also checks the reset value.
module tb_citb;
  import noc_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [NDIRS-1:0] wr;
  cit_entry_t       wdata [NDIRS];
  cit_entry_t       rows  [NDIRS];
  logic [NDIRS-1:0] nbr_cong;

  always #5 clk = ~clk;

  citb dut (.clk, .rst_n, .wr_i(wr), .wr_data_i(wdata), .rows_o(rows), .nbr_cong_o(nbr_cong));

  int checks = 0;
  int failures = 0;
  cit_entry_t model [NDIRS];

  task automatic compare();
    for (int d = 0; d < NDIRS; d++) begin
      checks++;
      if (rows[d] != model[d] || nbr_cong[d] != (model[d].delay_info > 4'd10)) begin
        failures++;
        $display("FAIL row %0d: got %h/%b want %h", d, rows[d], nbr_cong[d], model[d]);
      end
    end
  endtask

  initial begin
    wr = '0;
    for (int d = 0; d < NDIRS; d++) begin
      wdata[d] = '0;
      model[d] = '0;
    end
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr = 4'($urandom);
      for (int d = 0; d < NDIRS; d++) wdata[d] = cit_entry_t'($urandom);
      @(posedge clk);
      for (int d = 0; d < NDIRS; d++) if (wr[d]) model[d] = wdata[d];
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
