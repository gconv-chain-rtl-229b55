// tb_gconv_instr_mem: checks reset-to-zero (the delimiter value), writes
// and combinational reads of one instruction buffer.
module tb_gconv_instr_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] shadow [256];
  int checks = 0, failures = 0;

  gconv_instr_mem #(.WIDTH(64), .DEPTH(256)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a += 5) begin
      raddr = 8'(a);
      #1;
      checks++;
      if (rdata != 0) failures++;
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom}; shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 600; i++) begin
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata != shadow[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
