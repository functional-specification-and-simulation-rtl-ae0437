// tb_fpu_arith_ctrl -- the arithmetic state machine and cycle counter under random starts,
// suspensions and traps, compared cycle by cycle with a model written from the state table
// (transition vector <start, suspend, STOP>, trap overriding it). Also checks that, without
// suspension, the write state comes 3, 8 and 21 cycles after the decode cycle for add-class,
// multiply and divide instructions, and that busy is low exactly in INACTIVE and WRITE.
module tb_fpu_arith_ctrl;
  import spur_fpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, suspend, trap, stop, busy, write_en;
  logic [9:0] opv_in, opv;
  astate_e state;
  logic [4:0] cnt;
  int checks = 0, failures = 0;

  fpu_arith_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  astate_e ms;
  int mc, mlast;

  function automatic int last_of(input logic [9:0] v);
    return v[A_DIV] ? 21 : v[A_MUL] ? 8 : 3;
  endfunction

  task automatic run_latency(input int k, input int want);
    int c;
    @(negedge clk);
    start = 1; opv_in = 10'd1 << k; suspend = 0; trap = 0;
    @(negedge clk);
    start = 0;
    c = 1;
    while (state != S_WRITE && c < 40) begin @(negedge clk); c++; end
    checks++;
    if (c != want) begin failures++; $display("FAIL latency op %0d: write %0d cycles after decode, want %0d", k, c, want); end
    @(negedge clk);
  endtask

  initial begin
    start = 0; suspend = 0; trap = 0; opv_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_latency(A_ADD, 3); run_latency(A_MUL, 8); run_latency(A_DIV, 21); run_latency(A_MOV, 3);
    ms = S_INACTIVE; mc = 0; mlast = 3;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      logic st, mstop;
      astate_e nx;
      @(negedge clk);
      // inputs for this cycle
      start = ($urandom() % 3 == 0) && !busy;
      opv_in = 10'd1 << ($urandom() % 10);
      suspend = ($urandom() % 4 == 0);
      trap = ($urandom() % 40 == 0);
      if (start) trap = 0;
      #1;
      checks++;
      if (state !== ms || cnt !== 5'(mc) || busy !== !(ms == S_INACTIVE || ms == S_WRITE) ||
          write_en !== (ms == S_WRITE)) begin
        failures++;
        $display("FAIL n=%0d state %0d/%0d cnt %0d/%0d", n, state, ms, cnt, mc);
      end
      // model, from the state table
      st = start; mstop = (mc == mlast);
      case (ms)
        S_INACTIVE:  nx = !st ? S_INACTIVE : suspend ? S_EARLY : S_FIRST;
        S_EARLY:     nx = suspend ? S_EARLY : S_FIRST;
        S_FIRST:     nx = suspend ? S_FIRST : S_SECOND;
        S_SECOND:    nx = suspend ? (mstop ? S_PREPARE : S_TRAPPABLE) : (mstop ? S_WRITE : S_SAFE);
        S_TRAPPABLE: nx = suspend ? (mstop ? S_PREPARE : S_TRAPPABLE) : (mstop ? S_WRITE : S_SAFE);
        S_PREPARE:   nx = suspend ? S_PREPARE : S_WRITE;
        S_SAFE:      nx = mstop ? S_WRITE : S_SAFE;
        default:     nx = !st ? S_INACTIVE : suspend ? S_EARLY : S_FIRST;
      endcase
      if (trap && ms != S_SAFE && !(ms == S_WRITE && !st)) nx = S_INACTIVE;
      if ((ms == S_INACTIVE || ms == S_WRITE) && st && !trap) begin mc = 2; mlast = last_of(opv_in); end
      else if (nx == S_INACTIVE || ms == S_WRITE) mc = 0;
      else if (!mstop) mc++;
      ms = nx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
