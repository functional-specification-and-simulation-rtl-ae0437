// tb_spur_fpu -- end-to-end test of the co-processor at its default configuration.
//
// The testbench plays the CPU and the cache. It presents one instruction per cycle on the
// opcode wires, holds a memory instruction until a cycle without suspension and an
// arithmetic instruction until fpuBusy is low, and keeps its own copy of the memory pipeline
// (execute, memory stages; cleared by a trap, held by a suspension) to know which address the
// data pins belong to. Cache misses are injected at random: fpuSuspend high for one to three
// cycles with the hit (dataValid) in the last of them; the data pins carry garbage during the
// miss. A store is captured from data_out when data_oe and dataValid are both high.
//
// Each arithmetic vector loads two random doubles, sets the rounding mode and the inexact
// enable by loading the status word (register 15), runs FADD, FSUB, FMUL, FDIV or FCMP,
// stores the status word and the extended result, converts the result to double and stores
// that. References are exact: products, quotients (with a remainder sticky bit) and aligned
// sums are formed in 256-bit integers and rounded to 64 or 53 bits in the selected mode.
// Directed cases then cover operand traps (infinity, zero divisor), overflow and underflow
// of a conversion to single, FMOV/FNEG/FABS, LD_SGL/ST_SGL and extended round trips, traps
// that kill an arithmetic and a memory instruction, and the cycle counts (result write
// 3, 8 and 21 cycles after decode for add, multiply and divide).
// Every mechanism is counted and a mechanism that never happened is a failure.
module tb_spur_fpu;
  import spur_fpu_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [6:0]  fpuOPCODE;
  logic [4:0]  fpuRS1, fpuRS2, fpuRD;
  logic        fpuNewInstr, fpuSuspend, dataValid;
  logic [63:0] data_in, data_out;
  logic        data_oe, fpuBusy, fpuExcep, fpuBrT_F;
  int          checks = 0, failures = 0;

  spur_fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ environment
  typedef struct packed { logic v, ld, st; logic [5:0] addr; } mstage_t;
  logic [63:0] memarr [64];
  mstage_t     m_ldst2, m_mem;
  logic        m_mem_first;
  int          susp_left = 0, susp_pct = 0;
  int          cyc = 0;

  // mechanism counters
  int n_susp_load, n_susp_store, n_early, n_trappable, n_prepare, n_safe, n_overlap, n_stall,
      n_parallel, n_trap_arith, n_trap_mem, n_opexc, n_ovf, n_unf, n_inexact, n_tf_true,
      n_tf_false, n_divzero, n_zero, n_b2b, n_ge128, n_store_hold, n_rm[4];

  function automatic void check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endfunction

  // One machine cycle: apply the instruction (valid=0 for none), play the cache, advance the
  // pipeline model. Returns whether the instruction was accepted.
  task automatic step(input logic valid, input logic [6:0] op, input logic [4:0] rs1,
                      input logic [4:0] rs2, input logic [4:0] rd, input logic [5:0] addr,
                      output logic accepted);
    logic susp, dv, is_mem, is_ld, is_st, is_ar, is_trap;
    @(negedge clk);
    cyc++;
    is_ld   = valid && op inside {OP_LD_SGL, OP_LD_DBL, OP_LD_EXT1, OP_LD_EXT2};
    is_st   = valid && op inside {OP_ST_SGL, OP_ST_DBL, OP_ST_EXT1, OP_ST_EXT2};
    is_mem  = is_ld || is_st;
    is_ar   = valid && op inside {[OP_FADD:OP_CVTS]};
    is_trap = valid && op == OP_TRAP;
    // cache
    if (susp_left == 0 && ($urandom() % 100) < susp_pct) susp_left = 1 + $urandom() % 3;
    susp = (susp_left > 0);
    if (susp) susp_left--;
    dv = !susp || susp_left == 0;
    fpuSuspend = susp;
    dataValid  = dv;
    fpuNewInstr = valid;
    fpuOPCODE = valid ? op : 7'h00;
    fpuRS1 = rs1; fpuRS2 = rs2; fpuRD = rd;
    data_in = (m_mem.v && m_mem.ld && dv) ? memarr[m_mem.addr] : {$urandom(), $urandom()};
    #1;
    if (m_mem.v && m_mem.st) begin
      if (m_mem_first) check(data_oe, "pads driven in the first memory cycle of a store");
      if (data_oe && dv) memarr[m_mem.addr] = data_out;
      if (susp) n_susp_store++;
      if (susp && data_oe && !dv) n_store_hold++;
    end
    if (m_mem.v && m_mem.ld && susp) n_susp_load++;
    // observations of the arithmetic machine
    case (dut.u_actl.state)
      S_EARLY:     n_early++;
      S_TRAPPABLE: n_trappable++;
      S_PREPARE:   n_prepare++;
      S_SAFE:      n_safe++;
      default: ;
    endcase
    accepted = is_trap || (is_mem && !susp) || (is_ar && !fpuBusy);
    if (is_ar && fpuBusy) n_stall++;
    if (is_ar && accepted && dut.u_actl.state == S_WRITE) n_overlap++;
    if (is_mem && accepted && fpuBusy) n_parallel++;
    if (is_st && accepted && m_ldst2.v && m_ldst2.ld && !susp) n_b2b++;
    // pipeline model
    m_mem_first = 1'b0;
    if (is_trap) begin
      m_ldst2 = '0; m_mem = '0;
    end else if (!susp) begin
      m_mem_first = m_ldst2.v;
      m_mem   = m_ldst2;
      m_ldst2 = '{v: is_mem, ld: is_ld, st: is_st, addr: addr};
    end
  endtask

  task automatic idle(input int n);
    logic a;
    repeat (n) step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, a);
  endtask

  // Issue until accepted (the CPU holds the instruction while the FPU refuses it).
  task automatic issue(input logic [6:0] op, input logic [4:0] rs1, input logic [4:0] rs2,
                       input logic [4:0] rd, input logic [5:0] addr);
    logic a;
    int guard = 0;
    do begin
      step(1'b1, op, rs1, rs2, rd, addr, a);
      guard++;
    end while (!a && guard < 1000);
  endtask

  // Wait until the memory pipeline has no instruction before its write stage.
  task automatic drain();
    logic a;
    step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, a);
    while (m_ldst2.v || m_mem.v) step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, a);
  endtask

  task automatic wait_idle();
    logic a;
    step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, a);
    while (fpuBusy) step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, a);
    drain();
    idle(1);    // arithmetic write and memory pipeline drained
  endtask

  // ------------------------------------------------------------------ reference arithmetic
  // Round the exact value m * 2^scale to prec bits. Returns the fraction with its leading one
  // at bit 63, the true exponent and the inexact flag.
  task automatic rnd(input logic [255:0] m, input int scale, input int prec, input logic [1:0] rm,
                     input logic s, output logic [63:0] frac, output int texp, output logic inx);
    int p, sh;
    logic [255:0] keep, rem, half;
    logic inc;
    p = 0;
    for (int i = 0; i < 256; i++) if (m[i]) p = i;
    if (p >= prec - 1) begin
      sh   = p - (prec - 1);
      keep = m >> sh;
      rem  = m & ((256'd1 << sh) - 256'd1);
      half = (sh > 0) ? (256'd1 << (sh - 1)) : 256'd0;
    end else begin
      sh   = 0;
      keep = m << (prec - 1 - p);
      rem  = 0;
      half = 0;
    end
    inx = (rem != 0);
    case (rm)
      RM_NEAREST: inc = (sh > 0) && (rem > half || (rem == half && keep[0]));
      RM_ZERO:    inc = 1'b0;
      RM_PINF:    inc = !s && inx;
      default:    inc = s && inx;
    endcase
    keep = keep + 256'(inc);
    if (keep[prec]) begin keep = keep >> 1; p++; end
    frac = 64'(keep << (64 - prec));
    texp = scale + p;
  endtask

  function automatic logic [63:0] mkdbl(input logic s, input int e, input logic [51:0] f);
    return {s, 11'(e + 1023), f};
  endfunction

  function automatic logic [16:0] iexp(input int texp);
    return 17'(texp - 1);
  endfunction

  // ------------------------------------------------------------------ vectors
  task automatic arith_vector(input logic [6:0] op, input logic [63:0] a, input logic [63:0] b,
                              input logic [1:0] rm, input logic ei, input logic [2:0] mask,
                              input int pct, input logic chk_lat);
    logic [63:0] fpsw_w, exp_fpsw, w1, w2, wd;
    logic [52:0] ma, mb;
    int ea, eb, scale, texp, texp2, busy_cycles, want;
    logic [255:0] m, q, r;
    logic excep, sa, sb, s, inx, inx2, zero, dz_a, dz_b, lt, eq, gt, cond;
    logic [63:0] frac, frac2;
    logic acc;

    sa = a[63]; sb = b[63];
    dz_a = (a[62:0] == 0); dz_b = (b[62:0] == 0);
    ma = {1'b1, a[51:0]}; mb = {1'b1, b[51:0]};
    ea = int'(a[62:52]) - 1023; eb = int'(b[62:52]) - 1023;
    if (dz_a) ma = 0;
    if (dz_b) mb = 0;

    fpsw_w = '0;
    fpsw_w[FPSW_RM +: 2] = rm;
    fpsw_w[FPSW_EE] = 1'b1;
    fpsw_w[FPSW_EI] = ei;
    memarr[0] = a; memarr[1] = b; memarr[6] = fpsw_w;
    n_rm[rm]++;

    susp_pct = pct;
    issue(OP_LD_EXT2, 0, 0, 15, 6);
    issue(OP_LD_DBL, 0, 0, 1, 0);
    issue(OP_LD_DBL, 0, 0, 2, 1);
    drain();
    susp_pct = chk_lat ? 0 : pct;
    if (chk_lat) drain();
    issue(op, 1, 2, (op == OP_FCMP) ? {2'b00, mask} : 5'd3, 0);
    busy_cycles = 0;
    step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, acc);
    while (fpuBusy) begin
      busy_cycles++;
      if (busy_cycles == 1 && !chk_lat) step(1'b1, OP_LD_EXT2, 5'd0, 5'd0, 5'd13, 6'd23, acc);
      else step(1'b0, 7'h0, 5'd0, 5'd0, 5'd0, 6'd0, acc);
    end
    if (chk_lat) begin
      want = (op == OP_FMUL) ? 7 : (op == OP_FDIV) ? 20 : 2;
      check(busy_cycles == want, $sformatf("busy cycles %0d for op %h, want %0d", busy_cycles, op, want));
      check(dut.u_actl.state == S_WRITE, "write state after busy");
    end
    susp_pct = pct;
    issue(OP_ST_EXT2, 0, 0, 15, 5);
    excep = fpuExcep;
    if (op != OP_FCMP) begin
      issue(OP_ST_EXT1, 0, 0, 3, 2);
      issue(OP_ST_EXT2, 0, 0, 3, 3);
      issue(OP_CVTD, 3, 0, 4, 0);
      wait_idle();
      issue(OP_ST_DBL, 0, 0, 4, 4);
    end
    wait_idle();

    // reference
    zero = 1'b0;
    s = 1'b0;
    case (op)
      OP_FMUL: begin m = 256'(ma) * 256'(mb); scale = ea + eb - 104; s = sa ^ sb; end
      OP_FDIV: begin
        q = (256'(ma) << 200) / 256'(mb); r = (256'(ma) << 200) % 256'(mb);
        m = (q << 1) | 256'(r != 0); scale = ea - eb - 201; s = sa ^ sb;
      end
      default: begin
        logic sbe;
        logic [255:0] x, y;
        int lo;
        sbe = sb ^ (op != OP_FADD);
        if (dz_a) ea = eb;
        if (dz_b) eb = ea;
        // a gap beyond 180 places: the smaller operand only acts as a sticky bit
        if ((ea > eb ? ea - eb : eb - ea) >= 128) n_ge128++;
        if (ea - eb > 180) begin eb = ea - 180; mb = (mb != 0); end
        if (eb - ea > 180) begin ea = eb - 180; ma = (ma != 0); end
        lo = (ea < eb) ? ea : eb;
        x = 256'(ma) << (ea - lo);
        y = 256'(mb) << (eb - lo);
        scale = lo - 52;
        if (sa == sbe) begin m = x + y; s = sa; end
        else if (x > y) begin m = x - y; s = sa; end
        else if (y > x) begin m = y - x; s = sbe; end
        else begin m = 0; s = (rm == RM_MINF); end
      end
    endcase
    zero = (m == 0);
    if (zero) begin frac = 0; texp = 0; inx = 0; end
    else rnd(m, scale, 64, rm, s, frac, texp, inx);

    exp_fpsw = fpsw_w;
    exp_fpsw[FPSW_OT1 +: 3] = dz_a ? DT_ZERO : DT_NORM;
    exp_fpsw[FPSW_OT2 +: 3] = dz_b ? DT_ZERO : DT_NORM;
    if (op == OP_FDIV && dz_b) begin
      exp_fpsw[FPSW_O] = 1'b1;
      exp_fpsw[FPSW_E] = 1'b1;
      n_divzero++;
      n_opexc++;
      check(memarr[5] === exp_fpsw, $sformatf("div by zero FPSW %h want %h", memarr[5], exp_fpsw));
      check(excep === 1'b1, "fpuExcep on division by zero");
      return;
    end
    if (op == OP_FCMP) begin
      lt = (s && !zero); eq = zero; gt = (!s && !zero);
      cond = |(mask & {lt, eq, gt});
      exp_fpsw[FPSW_TF] = cond;
      if (cond) n_tf_true++; else n_tf_false++;
      check(memarr[5] === exp_fpsw, $sformatf("cmp FPSW %h want %h (a=%h b=%h)", memarr[5], exp_fpsw, a, b));
      check(fpuBrT_F === cond, "fpuBrT_F");
      return;
    end
    exp_fpsw[FPSW_X] = inx;
    exp_fpsw[FPSW_E] = ei & inx;
    if (inx) n_inexact++;
    if (zero) n_zero++;
    check(memarr[5] === exp_fpsw, $sformatf("op %h FPSW %h want %h (a=%h b=%h rm=%0d)", op, memarr[5], exp_fpsw, a, b, rm));
    w1 = zero ? {s, EZERO, 9'b0, RT_EXT, DT_ZERO, 32'b0} : {s, iexp(texp), 9'b0, RT_EXT, DT_NORM, 32'b0};
    check(memarr[2] === w1 && memarr[3] === frac,
          $sformatf("op %h rm %0d a=%h b=%h: got %h %h want %h %h", op, rm, a, b, memarr[2], memarr[3], w1, frac));
    // conversion of the extended result to double
    if (zero) wd = {s, 63'b0};
    else begin
      rnd(256'(frac), texp - 63, 53, rm, s, frac2, texp2, inx2);
      wd = mkdbl(s, texp2, frac2[62:11]);
    end
    check(memarr[4] === wd, $sformatf("CVTD/ST_DBL op %h a=%h b=%h: got %h want %h", op, a, b, memarr[4], wd));
  endtask

  function automatic logic [63:0] rnd_dbl(input int erange);
    int e;
    e = int'($urandom() % (2 * erange + 1)) - erange;
    return mkdbl($urandom() % 2, e, {$urandom(), $urandom()});
  endfunction

  // ------------------------------------------------------------------ main
  initial begin
    logic [63:0] a, b;
    logic [6:0] op;
    logic acc;
    logic [63:0] w;
    fpuOPCODE = 0; fpuRS1 = 0; fpuRS2 = 0; fpuRD = 0; fpuNewInstr = 0; fpuSuspend = 0;
    dataValid = 1; data_in = 0;
    m_ldst2 = '0; m_mem = '0; m_mem_first = 0;
    {n_susp_load, n_susp_store, n_early, n_trappable, n_prepare, n_safe, n_overlap, n_stall,
     n_parallel, n_trap_arith, n_trap_mem, n_opexc, n_ovf, n_unf, n_inexact, n_tf_true,
     n_tf_false, n_divzero, n_zero, n_b2b, n_ge128, n_store_hold} = '0;
    n_rm = '{0, 0, 0, 0};
    for (int i = 0; i < 64; i++) memarr[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // cycle counts, no suspension
    arith_vector(OP_FADD, rnd_dbl(20), rnd_dbl(20), RM_NEAREST, 1'b0, 3'b000, 0, 1'b1);
    arith_vector(OP_FMUL, rnd_dbl(20), rnd_dbl(20), RM_NEAREST, 1'b0, 3'b000, 0, 1'b1);
    arith_vector(OP_FDIV, rnd_dbl(20), rnd_dbl(20), RM_NEAREST, 1'b0, 3'b000, 0, 1'b1);
    // directed: exact cancellation, zero operand, large exponent gap, division by zero
    a = rnd_dbl(20);
    arith_vector(OP_FSUB, a, a, RM_NEAREST, 1'b0, 3'b000, 0, 1'b0);
    arith_vector(OP_FSUB, a, a, RM_MINF, 1'b0, 3'b000, 0, 1'b0);
    arith_vector(OP_FADD, a, 64'h0, RM_NEAREST, 1'b0, 3'b000, 0, 1'b0);
    arith_vector(OP_FMUL, a, 64'h8000_0000_0000_0000, RM_NEAREST, 1'b0, 3'b000, 0, 1'b0);
    arith_vector(OP_FADD, mkdbl(0, 150, 52'h12345), mkdbl(1, -150, 52'h6789a), RM_PINF, 1'b1, 3'b000, 0, 1'b0);
    arith_vector(OP_FDIV, a, 64'h0, RM_NEAREST, 1'b0, 3'b000, 0, 1'b0);
    arith_vector(OP_FCMP, a, a, RM_NEAREST, 1'b0, 3'b010, 0, 1'b0);

    // random vectors with random cache misses
    for (int n = 0; n < 160; n++) begin
      case ($urandom() % 5)
        0: op = OP_FADD; 1: op = OP_FSUB; 2: op = OP_FMUL; 3: op = OP_FDIV; default: op = OP_FCMP;
      endcase
      a = rnd_dbl((n % 4 == 0) ? 200 : 30);
      b = rnd_dbl((n % 4 == 0) ? 200 : 30);
      if (n % 7 == 3) b = a ^ (64'($urandom() % 2) << 63);
      arith_vector(op, a, b, 2'($urandom()), 1'($urandom()), 3'($urandom()), 30, 1'b0);
    end
    susp_pct = 0;

    // operand trap: infinity operand
    memarr[0] = 64'h7ff0_0000_0000_0000; memarr[1] = mkdbl(0, 3, 52'h1); memarr[6] = 64'h0;
    memarr[7] = 64'hdead_beef_0000_0001;
    issue(OP_LD_EXT2, 0, 0, 15, 6); issue(OP_LD_DBL, 0, 0, 1, 0); issue(OP_LD_DBL, 0, 0, 2, 1);
    issue(OP_LD_EXT2, 0, 0, 3, 7);
    drain();
    issue(OP_FADD, 1, 2, 3, 0);
    wait_idle();
    issue(OP_ST_EXT2, 0, 0, 15, 5); issue(OP_ST_EXT2, 0, 0, 3, 8);
    wait_idle();
    w = 0; w[FPSW_O] = 1; w[FPSW_E] = 1; w[FPSW_OT1 +: 3] = DT_INF; w[FPSW_OT2 +: 3] = DT_NORM;
    check(memarr[5] === w, $sformatf("operand trap FPSW %h want %h", memarr[5], w));
    check(memarr[8] === 64'hdead_beef_0000_0001, "operand trap cancels the result write");
    check(fpuExcep === 1'b1, "fpuExcep on operand trap");
    n_opexc++;

    // conversion to single: overflow and underflow, and a plain value with LD_SGL/ST_SGL
    memarr[0] = mkdbl(0, 300, 52'h0); memarr[1] = mkdbl(1, -300, 52'h0);
    memarr[6] = 64'h0; memarr[6][FPSW_EE] = 1'b1;
    issue(OP_LD_EXT2, 0, 0, 15, 6); issue(OP_LD_DBL, 0, 0, 1, 0); issue(OP_LD_DBL, 0, 0, 2, 1);
    drain();
    issue(OP_CVTS, 1, 0, 3, 0); wait_idle();
    issue(OP_ST_EXT2, 0, 0, 15, 5); wait_idle();
    check(memarr[5][FPSW_V] && memarr[5][FPSW_E] && !memarr[5][FPSW_U], $sformatf("CVTS overflow FPSW %h", memarr[5]));
    if (memarr[5][FPSW_V]) n_ovf++;
    issue(OP_CVTS, 2, 0, 3, 0); wait_idle();
    issue(OP_ST_EXT2, 0, 0, 15, 5); wait_idle();
    check(memarr[5][FPSW_U] && memarr[5][FPSW_E] && !memarr[5][FPSW_V], $sformatf("CVTS underflow FPSW %h", memarr[5]));
    if (memarr[5][FPSW_U]) n_unf++;
    // single round trip: 1.5 * 2^10 rounded from a double with low bits set
    memarr[0] = mkdbl(1, 10, 52'h8000_0000_0000_1);
    issue(OP_LD_DBL, 0, 0, 1, 0); drain();
    issue(OP_CVTS, 1, 0, 3, 0); wait_idle();
    issue(OP_ST_SGL, 0, 0, 3, 9); wait_idle();
    check(memarr[9] === {1'b1, 8'(10 + 127), 23'h40_0000, 32'h0}, $sformatf("ST_SGL got %h", memarr[9]));
    memarr[10] = {1'b0, 8'(127 - 3), 23'h12_3456, 32'h0};
    issue(OP_LD_SGL, 0, 0, 5, 10); drain();
    issue(OP_ST_DBL, 0, 0, 5, 11); wait_idle();
    check(memarr[11] === mkdbl(0, -3, {23'h12_3456, 29'h0}), $sformatf("LD_SGL/ST_DBL got %h", memarr[11]));

    // transfers and extended round trip
    memarr[12] = {1'b1, 17'h00005, 9'b0, RT_EXT, DT_NORM, 32'b0};
    memarr[13] = 64'hc000_0000_0000_1234;
    issue(OP_LD_EXT1, 0, 0, 6, 12); issue(OP_LD_EXT2, 0, 0, 6, 13); drain();
    issue(OP_FNEG, 6, 0, 7, 0);
    issue(OP_FABS, 6, 0, 8, 0);
    issue(OP_FMOV, 6, 0, 9, 0);
    wait_idle();
    issue(OP_ST_EXT1, 0, 0, 7, 14); issue(OP_ST_EXT1, 0, 0, 8, 15); issue(OP_ST_EXT1, 0, 0, 9, 16);
    issue(OP_ST_EXT2, 0, 0, 9, 17);
    wait_idle();
    check(memarr[14] === {1'b0, memarr[12][62:0]}, "FNEG");
    check(memarr[15] === {1'b0, memarr[12][62:0]}, "FABS");
    check(memarr[16] === memarr[12] && memarr[17] === memarr[13], "FMOV and extended round trip");

    // trap kills an arithmetic instruction in its first execute cycle
    memarr[18] = 64'h1111_2222_3333_4444;
    issue(OP_LD_EXT2, 0, 0, 10, 18); drain();
    issue(OP_FMUL, 6, 6, 10, 0);
    issue(OP_TRAP, 0, 0, 0, 0);
    idle(1);
    check(dut.u_actl.state == S_INACTIVE, "trap returns the arithmetic machine to inactive");
    if (dut.u_actl.state == S_INACTIVE) n_trap_arith++;
    wait_idle();
    // trap kills a load in its execute cycle
    memarr[19] = 64'h5555_6666_7777_8888;
    issue(OP_LD_EXT2, 0, 0, 10, 19);
    issue(OP_TRAP, 0, 0, 0, 0);
    wait_idle();
    issue(OP_ST_EXT2, 0, 0, 10, 20); wait_idle();
    check(memarr[20] === 64'h1111_2222_3333_4444, $sformatf("trapped instructions leave R10 alone: %h", memarr[20]));
    if (memarr[20] === 64'h1111_2222_3333_4444) n_trap_mem++;

    // arithmetic instruction accepted during a suspension (early wait), and suspended after
    // finishing (prepare to write)
    begin
      logic aa;
      susp_left = 2;
      issue(OP_FADD, 1, 2, 11, 0);
      susp_left = 0;
      wait_idle();
      issue(OP_FADD, 1, 2, 11, 0);
      step(1'b0, 0, 0, 0, 0, 0, aa);
      susp_left = 4;
      wait_idle();
    end

    // load directly followed by a store (both datapaths active)
    memarr[21] = 64'h0123_4567_89ab_cdef;
    issue(OP_LD_EXT2, 0, 0, 12, 21);
    issue(OP_ST_EXT2, 0, 0, 6, 22);
    wait_idle();
    check(memarr[22] === memarr[13], "store right after a load");

    // mechanism report
    $display("mechanisms: susp_load=%0d susp_store=%0d store_hold=%0d early=%0d trappable=%0d prepare=%0d safe=%0d",
             n_susp_load, n_susp_store, n_store_hold, n_early, n_trappable, n_prepare, n_safe);
    $display("  overlap=%0d stall=%0d parallel=%0d trap_arith=%0d trap_mem=%0d opexc=%0d ovf=%0d unf=%0d",
             n_overlap, n_stall, n_parallel, n_trap_arith, n_trap_mem, n_opexc, n_ovf, n_unf);
    $display("  inexact=%0d tf_true=%0d tf_false=%0d divzero=%0d zero=%0d ld_st=%0d ge128=%0d rm=%0d/%0d/%0d/%0d",
             n_inexact, n_tf_true, n_tf_false, n_divzero, n_zero, n_b2b, n_ge128,
             n_rm[0], n_rm[1], n_rm[2], n_rm[3]);
    foreach (n_rm[i]) check(n_rm[i] > 0, "rounding mode used");
    check(n_susp_load > 0, "load suspended"); check(n_susp_store > 0, "store suspended");
    check(n_store_hold > 0, "pads held until hit");
    check(n_early > 0, "early wait"); check(n_trappable > 0, "trappable wait");
    check(n_prepare > 0, "prepare to write"); check(n_safe > 0, "safe");
    check(n_overlap > 0, "write/decode overlap"); check(n_stall > 0, "busy stall");
    check(n_parallel > 0, "memory op during arithmetic");
    check(n_trap_arith > 0, "trap of arithmetic"); check(n_trap_mem > 0, "trap of memory op");
    check(n_opexc > 0, "operand exception"); check(n_ovf > 0, "overflow"); check(n_unf > 0, "underflow");
    check(n_inexact > 0, "inexact"); check(n_tf_true > 0, "compare true"); check(n_tf_false > 0, "compare false");
    check(n_divzero > 0, "division by zero"); check(n_zero > 0, "zero result");
    check(n_b2b > 0, "load followed by store"); check(n_ge128 > 0, "alignment shift of 128 or more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
