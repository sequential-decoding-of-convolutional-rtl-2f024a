// tb_input_buffer: writes a random frame, reads every step back through
// two read ports and checks
// that a write outside the frame or with wr_en low changes nothing.
module tb_input_buffer;
  import cmqa_pkg::*;
  localparam int unsigned FL = 500;

  logic          clk = 0;
  logic          wr_en = 0;
  logic [DW-1:0] wr_addr = '0;
  logic [DW-1:0] rd_addr [2];
  logic [1:0]    wr_data = '0;
  logic [1:0]    rd_data [2];
  logic [1:0]    img [FL];
  int checks = 0, failures = 0, cycles = 0;

  input_buffer #(.FRAME_LEN(FL), .RPORTS(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    for (int i = 0; i < FL; i++) begin
      img[i] = 2'($urandom);
      @(negedge clk); wr_en = 1; wr_addr = DW'(i); wr_data = img[i];
    end
    @(negedge clk); wr_en = 0; wr_addr = DW'(3); wr_data = ~img[3];
    @(negedge clk); wr_en = 1; wr_addr = DW'(FL); wr_data = 2'b11;
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < FL; i++) begin
      rd_addr[0] = DW'(i); rd_addr[1] = DW'(FL - 1 - i); #1;
      checks += 2;
      if (rd_data[0] !== img[i] || rd_data[1] !== img[FL-1-i]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
