// tb_flit_fifo - self-checking test of the VC flit queue.
//
// Random push/pop traffic (never pushing a full or popping an empty queue)
// against a queue model; checks head data, empty and full every cycle and
// that a full queue holds exactly DEPTH words.
module tb_flit_fifo;
  localparam int W = 20, DEPTH = 4;

  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0;
  logic         push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [$];
  int           fills = 0;

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk (clk), .rst_n (rst_n), .push (push), .din (din), .pop (pop),
    .dout (dout), .empty (empty), .full (full)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() != 0) check(dout == model[0], $sformatf("dout %h exp %h", dout, model[0]));
      if (full) fills++;
      // bias toward filling in the first half, draining in the second
      push = !full && ($urandom_range(99) < ((cyc % 400) < 200 ? 75 : 30));
      pop  = !empty && ($urandom_range(99) < ((cyc % 400) < 200 ? 30 : 75));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(fills > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
