// tb_survivor_memory: writes random words at random addresses and checks
// the asynchronous read port against a model array, including a read of
// the word being written (old value until the clock edge).
module tb_survivor_memory;
  localparam int WIDTH = 4, DEPTH = 64, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  survivor_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = WIDTH'($urandom()); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      waddr = AW'($urandom());
      wdata = WIDTH'($urandom());
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom());
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("read %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("after write %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
