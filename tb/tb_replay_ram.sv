// Testbench for replay_ram (16 words x 8 bit).
// Loads random words, then checks against a model, clock by clock, that
// the output shows the word at the read address, that 'advance' steps the
// address, that it wraps after 'last_addr' and sets 'wrapped', that
// 'restart' and reset return to word 0, and that without 'advance' the
// sample holds. Also reloads a word while it is being replayed.
module tb_replay_ram;
  localparam int DEPTH = 16, WIDTH = 8, AW = 4;

  logic             clk = 0, rst_n = 0;
  logic             load_we = 0, restart = 0, advance = 0;
  logic [AW-1:0]    load_addr = '0, last_addr = '0;
  logic [WIDTH-1:0] load_data = '0;
  logic [WIDTH-1:0] sample;
  logic             wrapped;

  replay_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] mem [DEPTH];
  int  addr = 0;
  bit  wr_m = 0;
  int  n_wrap = 0, n_restart = 0, n_hold = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: apply inputs, update the model, check after the edge
  task automatic step(input bit adv, input bit rst, input bit we = 0,
                      input int wa = 0, input logic [WIDTH-1:0] wd = '0);
    @(negedge clk);
    advance = adv; restart = rst; load_we = we; load_addr = AW'(wa); load_data = wd;
    @(posedge clk);
    #1;
    if (we) mem[wa] = wd;
    if (rst) begin addr = 0; wr_m = 0; n_restart++; end
    else if (adv) begin
      if (addr == int'(last_addr)) begin addr = 0; wr_m = 1; n_wrap++; end
      else addr++;
    end
    else n_hold++;
    @(negedge clk);
    advance = 0; restart = 0; load_we = 0;
    @(posedge clk);
    #1;
    checks += 2;
    if (sample !== mem[addr]) begin
      failures++;
      $display("addr %0d: sample %h expected %h", addr, sample, mem[addr]);
    end
    if (wrapped !== wr_m) begin
      failures++;
      $display("wrapped %b expected %b", wrapped, wr_m);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = WIDTH'($urandom);
      mem[i] = load_data;
    end
    @(negedge clk) load_we = 0;
    last_addr = 4'd9;
    step(0, 0);                                      // word 0 shown
    for (int i = 0; i < 25; i++) step(1, 0);         // two wraps at word 9
    step(0, 0); step(0, 0);                          // hold
    step(0, 1);                                      // restart
    for (int i = 0; i < 3; i++) step(1, 0);
    step(0, 0, 1, addr, 8'hA5);                      // reload the shown word
    last_addr = 4'd15;
    for (int i = 0; i < 40; i++) step(1'($urandom_range(0, 1)), $urandom_range(0, 9) == 0);
    // asynchronous reset returns to word 0
    @(negedge clk);
    rst_n = 0; #2;
    checks++;
    if (wrapped !== 1'b0) begin failures++; $display("wrapped not cleared by reset"); end
    rst_n = 1; addr = 0; wr_m = 0;
    step(0, 0);
    checks += 3;
    if (n_wrap < 2)    begin failures++; $display("too few wraps"); end
    if (n_restart < 2) begin failures++; $display("too few restarts"); end
    if (n_hold < 2)    begin failures++; $display("too few holds"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
