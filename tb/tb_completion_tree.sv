// tb_completion_tree: checks the global completion circuit of a 32-bit adder.
// Each cycle starts from the precharged state (all Comp(i) low, carry-out
// unevaluated, gco low), then raises the Comp(i) one at a time in a random
// order and evaluates the carry-out at a random point of that sequence. gco
// must stay low until the last of the 33 completions and rise with it. The
// inputs are then returned to the precharged state in a random order: gco
// must hold high (C-element behaviour) until both the whole tree and the
// carry completion have returned, and fall then.
module tb_completion_tree;
  import dcvs_pkg::*;

  localparam int unsigned WIDTH = 32;

  logic [WIDTH-1:0] comp;
  dr_t              cout;
  logic             gco;
  int unsigned checks = 0, failures = 0, holds = 0;

  completion_tree #(.WIDTH(WIDTH)) dut (.comp(comp), .cout(cout), .gco(gco));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic shuffle(ref int order[WIDTH]);
    for (int i = 0; i < WIDTH; i++) order[i] = i;
    for (int i = WIDTH - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[WIDTH];
    comp = '0;
    cout = DR_SPACER;
    #1;
    check(!gco, "gco low after precharge");
    for (int n = 0; n < 500; n++) begin
      int co_at;
      co_at = $urandom_range(WIDTH);   // carry-out evaluates before step co_at
      shuffle(order);
      for (int k = 0; k <= WIDTH; k++) begin
        if (k == co_at) begin
          cout = dr_of(1'($urandom));
          #1;
          check(gco == (k == WIDTH), "gco after carry-out");
        end
        if (k < WIDTH) begin
          comp[order[k]] = 1'b1;
          #1;
          check(gco == (k == WIDTH - 1 && co_at <= WIDTH - 1), "gco during evaluation");
        end
      end
      check(gco, "gco after all completions");
      // return to precharge
      co_at = $urandom_range(WIDTH);
      shuffle(order);
      for (int k = 0; k <= WIDTH; k++) begin
        if (k == co_at) begin
          cout = DR_SPACER;
          #1;
          check(gco == (k == 0), "gco after carry-out precharge");
        end
        if (k < WIDTH) begin
          comp[order[k]] = 1'b0;
          #1;
          check(gco == (co_at > k), "gco during precharge");
          if (gco) holds++;
        end
      end
      check(!gco, "gco after precharge");
    end
    check(holds > 0, "C-element hold never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
