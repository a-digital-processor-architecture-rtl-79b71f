// Testbench for block_ram at its default 512 x 32 size: random writes and
// reads against a shadow array, checking the one-clock read latency and
// read-before-write on a same-address access.
module tb_block_ram;
  localparam int DEPTH = 512, WIDTH = 32;
  logic             clk = 0;
  logic             we = 0;
  logic [8:0]       waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  block_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expv;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = $urandom; shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    // random mixed traffic
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      raddr = 9'($urandom_range(0, DEPTH - 1));
      we    = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 9'($urandom_range(0, DEPTH - 1));
      wdata = $urandom;
      expv  = shadow[raddr];            // old data on same-address write
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 5) $display("read %0d got %h expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
