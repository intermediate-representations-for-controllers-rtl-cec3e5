// tb_sweeps: the size sweeps of the three small table-driven structures.
//
//  - tables of depth d in {2, 8, 16, 32, 64, 256, 1024} and width
//    w in {2, 4, 16, 32, 64}: all 35 points, constant and programmable;
//  - FSMs with m in {2, 8} inputs, n in {2, 8, 16} outputs and
//    s in {2, 3, 8, 16, 17} states: all 30 points, constant tables;
//  - the one-hot decoder / flop / AND / mux example at n in {2, 4, 8, 16,
//    32, 64, 128} with no reset, synchronous and asynchronous reset: all 21
//    points, out must be 1 << in one clock later.
module tb_sweeps;
  import ctrl_pkg::*;

  localparam int unsigned TD [7] = '{1, 3, 4, 5, 6, 8, 10};  // log2 of the depths
  localparam int unsigned TW [5] = '{2, 4, 16, 32, 64};
  localparam int unsigned FM [2] = '{2, 8};
  localparam int unsigned FN [3] = '{2, 8, 16};
  localparam int unsigned FS [5] = '{2, 3, 8, 16, 17};
  localparam int unsigned ON [7] = '{2, 4, 8, 16, 32, 64, 128};

  logic clk = 0, rst = 1;
  int tc [35], tf [35];
  bit td [35];
  int fc [30], ff [30];
  bit fd [30];
  int oc = 0, of = 0;
  bit od = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 7; i++) begin : g_td
    for (genvar j = 0; j < 5; j++) begin : g_tw
      table_sweep_point #(.AW(TD[i]), .DW(TW[j])) pt (
        .clk, .rst, .checks(tc[i*5+j]), .failures(tf[i*5+j]), .done(td[i*5+j]));
    end
  end

  for (genvar a = 0; a < 2; a++) begin : g_fm
    for (genvar b = 0; b < 3; b++) begin : g_fn
      for (genvar c = 0; c < 5; c++) begin : g_fs
        fsm_sweep_point #(.M(FM[a]), .N(FN[b]), .S(FS[c])) pt (
          .clk, .rst, .checks(fc[a*15+b*5+c]), .failures(ff[a*15+b*5+c]), .done(fd[a*15+b*5+c]));
      end
    end
  end

  for (genvar i = 0; i < 7; i++) begin : g_on
    for (genvar r = 0; r < 3; r++) begin : g_rm
      localparam int unsigned N  = ON[i];
      localparam int unsigned LW = $clog2(N);
      logic [LW-1:0] in;
      logic [N-1:0]  out;
      onehot_mux #(.N(N), .RESET_MODE(rst_mode_e'(r))) dut (.clk, .rst, .in, .out);
      initial begin
        in = '0;
        @(negedge rst);
        for (int c = 0; c < 300; c++) begin
          @(negedge clk);
          in = LW'($urandom);
          @(posedge clk);
          #1;
          oc++;
          if (out !== (N'(1) << in)) begin
            of++;
            $display("FAIL onehot n=%0d mode=%0d: got %0h for in %0d", N, r, out, in);
          end
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", tc.sum() + fc.sum() + oc, tf.sum() + ff.sum() + of + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (td.and() && fd.and());
    repeat (5) @(posedge clk);
    $display("tables: checks=%0d failures=%0d", tc.sum(), tf.sum());
    $display("fsms: checks=%0d failures=%0d", fc.sum(), ff.sum());
    $display("onehot: checks=%0d failures=%0d", oc, of);
    $display("TB_RESULT checks=%0d failures=%0d", tc.sum() + fc.sum() + oc, tf.sum() + ff.sum() + of);
    $finish;
  end
endmodule
