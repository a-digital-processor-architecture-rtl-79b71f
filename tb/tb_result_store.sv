// Testbench for result_store (8 words x 12 bit).
// Writes random words with random gaps, checks 'count' and 'full' every
// clock against a model, checks that writes beyond DEPTH are dropped,
// reads every word back, and checks that 'clear' and reset empty the store
// and that writing starts again at word 0.
module tb_result_store;
  localparam int DEPTH = 8, WIDTH = 12, AW = 3;

  logic             clk = 0, rst_n = 0;
  logic             clear = 0, wr_en = 0;
  logic [WIDTH-1:0] wr_data = '0;
  logic [AW-1:0]    rd_addr = '0;
  logic [WIDTH-1:0] rd_data;
  logic [AW:0]      count;
  logic             full;

  result_store #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] mem [DEPTH];
  int  cnt = 0, dropped = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input bit we, input bit clr);
    @(negedge clk);
    wr_en = we; clear = clr; wr_data = WIDTH'($urandom);
    @(posedge clk);
    #1;
    if (clr) cnt = 0;
    else if (we) begin
      if (cnt < DEPTH) begin mem[cnt] = wr_data; cnt++; end
      else dropped++;
    end
    checks += 2;
    if (count !== (AW+1)'(cnt)) begin failures++; $display("count %0d expected %0d", count, cnt); end
    if (full !== (cnt == DEPTH)) begin failures++; $display("full %b at count %0d", full, cnt); end
  endtask

  task automatic read_all();
    @(negedge clk) wr_en = 0; clear = 0;
    for (int i = 0; i < cnt; i++) begin
      @(negedge clk) rd_addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== mem[i]) begin
        failures++; $display("word %0d: %h expected %h", i, rd_data, mem[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) cycle($urandom_range(0, 2) != 0, 0);
    for (int i = 0; i < 4; i++) cycle(1, 0);         // writes while full
    read_all();
    cycle(1, 1);                                     // clear wins over write
    for (int i = 0; i < 5; i++) cycle(1, 0);
    read_all();
    @(negedge clk) rst_n = 0; #2;
    checks++;
    if (count !== '0) begin failures++; $display("count not cleared by reset"); end
    rst_n = 1; cnt = 0;
    for (int i = 0; i < 3; i++) cycle(1, 0);
    read_all();
    checks++;
    if (dropped == 0) begin failures++; $display("no write was dropped when full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
