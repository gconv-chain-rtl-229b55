// tb_gconv_glb: random writes into both regions of a reduced global buffer
// followed by reads on both synchronous read ports (data one cycle after
// the address), checked against a shadow copy; out-of-range reads give 0.
module tb_gconv_glb;
  import gconv_pkg::*;
  localparam int unsigned DB = 1024, KB = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re_a = 0, re_b = 0, we = 0;
  logic [ADDR_W-1:0] addr_a = 0, addr_b = 0, waddr = 0;
  logic [DATA_W-1:0] rdata_a, rdata_b, wdata = 0;
  int checks = 0, failures = 0;
  logic [7:0] shadow [DB + KB];

  gconv_glb #(.DATA_BYTES(DB), .KERN_BYTES(KB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(DB + KB); a++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 2000; i++) begin
      int ea, eb;
      @(negedge clk);
      re_a = 1; re_b = 1;
      addr_a = ADDR_W'($urandom % (DB + KB + 16));
      addr_b = ADDR_W'($urandom % (DB + KB + 16));
      ea = (addr_a < DB + KB) ? int'(shadow[addr_a]) : 0;
      eb = (addr_b < DB + KB) ? int'(shadow[addr_b]) : 0;
      @(negedge clk);
      re_a = 0; re_b = 0;
      checks += 2;
      if (int'(rdata_a) != ea) failures++;
      if (int'(rdata_b) != eb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
