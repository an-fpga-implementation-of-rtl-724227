// tb_bram_bank: random writes and reads on both ports of a 16384 x 32
// bram_bank (the document's 64 KB), compared with a model array.  Read data
// must appear exactly one clock after the address (checked every read), and
// a port that writes returns the old word (read-first).
module tb_bram_bank;
  timeunit 1ns; timeprecision 100ps;
  localparam int W = 16384;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [13:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  bram_bank #(.WORDS(W), .WIDTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // initialise through port A, read back through port B
    for (int n = 0; n < W; n++) begin
      @(negedge clk);
      a_we = 1; a_addr = 14'(n); a_wdata = $urandom; model[n] = a_wdata;
    end
    @(negedge clk);
    a_we = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic [31:0] ea, eb;
      @(negedge clk);
      a_addr  = 14'($urandom % 64);
      b_addr  = 14'($urandom);
      a_we    = ($urandom % 4 == 0);
      b_we    = ($urandom % 4 == 0) && (b_addr != a_addr);
      a_wdata = $urandom;
      b_wdata = $urandom;
      ea = model[a_addr];
      eb = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata != ea) begin failures++; if (failures < 10) $display("FAIL A %0d: %h vs %h", a_addr, a_rdata, ea); end
      if (b_rdata != eb) begin failures++; if (failures < 10) $display("FAIL B %0d: %h vs %h", b_addr, b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
