// Self-checking testbench for wg_lfsr, both variants (combinational gamma
// multiplier with ce tied high, and pipelined multiplier with ce high only
// every other cycle outside loading). Loads 11 random words, then runs mixed
// init (random fb added) and run steps, and compares S(11) after every shift
// with a model of the register that uses the reference multiplication.
module wg_lfsr_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0, load = 1'b0, init = 1'b0, ce_p = 1'b0;
  gf_t  din = '0, fb = '0, s11_c, s11_p;
  gf_t  model [1:11];
  int   checks = 0, failures = 0;

  wg_lfsr #(.PIPELINED_MUL(1'b0)) dut_c (.clk(clk), .ce(1'b1), .load(load), .init(init),
                                         .din(din), .fb(fb), .s11(s11_c));
  wg_lfsr #(.PIPELINED_MUL(1'b1)) dut_p (.clk(clk), .ce(ce_p), .load(load), .init(init),
                                         .din(din), .fb(fb), .s11(s11_p));

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic gf_t model_first(input bit ld, input bit in_init, input gf_t d, input gf_t f);
    gf_t lf;
    lf = ref_mul(GAMMA_NB, model[11]) ^ model[10] ^ model[8] ^ model[5] ^ model[2] ^ model[1];
    return ld ? d : in_init ? lf ^ f : lf;
  endfunction

  task automatic shift_model(input gf_t first);
    for (int i = 11; i > 1; i--) model[i] = model[i-1];
    model[1] = first;
  endtask

  initial begin
    gf_t nxt;
    // loading: both variants shift every cycle
    @(negedge clk);
    load = 1'b1; ce_p = 1'b1;
    for (int i = 0; i < 11; i++) begin
      din = gf_t'($urandom);
      nxt = model_first(1'b1, 1'b0, din, fb);
      @(negedge clk);
      shift_model(nxt);
    end
    load = 1'b0;
    check("loaded S(11) (comb)", s11_c == model[11]);
    check("loaded S(11) (pipe)", s11_p == model[11]);
    // the pipelined variant's reference: a separate model, stepped every
    // other cycle; the combinational one steps every cycle
    begin
      gf_t mp [1:11];
      gf_t mc [1:11];
      mp = model; mc = model;
      for (int c = 0; c < 300; c++) begin
        init = (c < 150);
        fb = gf_t'($urandom);
        ce_p = c[0];
        model = mc;
        nxt = model_first(1'b0, init, din, fb);
        shift_model(nxt);
        mc = model;
        if (ce_p) begin
          model = mp;
          nxt = model_first(1'b0, init, din, fb);
          shift_model(nxt);
          mp = model;
        end
        @(negedge clk);
        check($sformatf("comb S(11) step %0d", c), s11_c == mc[11]);
        check($sformatf("pipe S(11) step %0d", c), s11_p == mp[11]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
