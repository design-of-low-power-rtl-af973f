// Test of the image memory at 6 x 7: fills it with random bits, reads all
// back and checks one-clock read latency, a held read (`re` low) and that a
// read of the address being written returns the old value.
module tb_image_ram;
  localparam int ROWS = 6, COLS = 7, DEPTH = ROWS*COLS;
  logic clk = 0, re = 0, we = 0, wdata = 0, rdata;
  logic [5:0] raddr = 0, waddr = 0;
  bit model [DEPTH];
  int checks = 0, failures = 0;

  image_ram #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = 1'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re = 1; raddr = 6'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("addr %0d read %0b", a, rdata); end
    end
    // held read
    @(negedge clk); re = 0; raddr = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[DEPTH-1]) failures++;
    // read and write the same address in one cycle
    @(negedge clk); re = 1; raddr = 6'd9; we = 1; waddr = 6'd9; wdata = !model[9];
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[9]) failures++;
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata !== !model[9]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
