// tb_gconv_lut: writes the whole table with random words and reads it back
// through both read ports; also checks that reset clears the table.
module tb_gconv_lut;
  import gconv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = 0;
  logic signed [ACC_W-1:0] wdata = 0;
  logic [1:0][7:0] raddr;
  logic signed [1:0][ACC_W-1:0] rdata;
  int checks = 0, failures = 0;
  int shadow [256];

  gconv_lut #(.DEPTH(256), .RD_PORTS(2)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a += 17) begin
      raddr[0] = 8'(a);
      #1;
      checks++;
      if (rdata[0] != 0) failures++;
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      shadow[a] = int'($urandom);
      we = 1; waddr = 8'(a); wdata = shadow[a];
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 512; i++) begin
      raddr[0] = 8'($urandom);
      raddr[1] = 8'($urandom);
      #1;
      checks += 2;
      if (int'(rdata[0]) != shadow[raddr[0]]) failures++;
      if (int'(rdata[1]) != shadow[raddr[1]]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
