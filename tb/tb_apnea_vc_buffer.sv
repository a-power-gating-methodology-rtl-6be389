// tb_apnea_vc_buffer: random writes and reads against a queue model; power
// cycling must empty the buffer.
module tb_apnea_vc_buffer;
  import apnea_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0, powered = 1, wr_en = 0, rd_en = 0;
  flit_t wr_flit = '0, rd_flit;
  logic rd_valid, empty;
  int checks = 0, failures = 0;
  flit_t model [$];

  apnea_vc_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      checks++;
      if (rd_valid != (model.size() != 0) || (rd_valid && rd_flit != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL it=%0d valid=%0b size=%0d", it, rd_valid, model.size());
      end
      if (it % 500 == 499) begin
        powered = 0; wr_en = 0; rd_en = 0;
        @(negedge clk); powered = 1; model.delete();
        checks++; if (rd_valid || !empty) failures++;
        continue;
      end
      rd_en = ($urandom % 3) != 0;
      wr_en = ($urandom % 2) && (model.size() < DEPTH || rd_en);
      wr_flit = flit_t'({$urandom, $urandom});
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
