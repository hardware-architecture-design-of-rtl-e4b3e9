// tb_bfsm: the controller with modelled neighbours.  Checks that a slice
// command flushes the buffer and starts the context initialization in the
// accepting cycle, then requests decoder initialization only after the
// initialization is done; that a block command starts the residual
// parser and routes its requests (and only them) to the decoder until it
// reports done; that SAO, MVD, intra-mode and PU commands do the same with
// their sequencers (a PU also passes on the requests of the MVD sequencer
// it calls);
// that an end command issues exactly one terminate request
// and reports its bin; and that cmd_ready is low while busy.
module tb_bfsm;
  import cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, bs_flush, init_start, init_done, adu_init_req, adu_init_done;
  logic tu_start, tu_done, bsru_req_valid, adu_req_valid, adu_bin_valid, adu_bin, eos_valid, eos_flag;
  cmd_e cmd;
  bin_mode_e bsru_req_mode, adu_req_mode, sao_req_mode, mvd_req_mode;
  logic sao_start, sao_done, sao_req_valid;
  logic mvd_start, mvd_done, mvd_req_valid;
  logic intra_start, intra_done, intra_req_valid;
  logic pu_start, pu_done, pu_req_valid;
  bin_mode_e pu_req_mode;
  bin_mode_e intra_req_mode;
  int checks = 0, failures = 0;

  bfsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic send(cmd_e c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    chk(cmd_ready, "ready when idle");
    chk(bs_flush == (c == CMD_SLICE) && init_start == (c == CMD_SLICE), "flush/init pulse");
    chk(tu_start == (c == CMD_TU), "tu_start pulse");
    chk(sao_start == (c == CMD_SAO), "sao_start pulse");
    chk(mvd_start == (c == CMD_MVD), "mvd_start pulse");
    chk(intra_start == (c == CMD_INTRA), "intra_start pulse");
    chk(pu_start == (c == CMD_PU), "pu_start pulse");
    @(negedge clk);
    cmd_valid = 0;
    #1;
    chk(!cmd_ready && !bs_flush && !tu_start && !sao_start && !mvd_start && !intra_start && !pu_start, "busy after command");
  endtask

  initial begin
    cmd_valid = 0; cmd = CMD_SLICE; init_done = 0; adu_init_done = 0; tu_done = 0;
    bsru_req_valid = 0; bsru_req_mode = BIN_REGULAR; adu_bin_valid = 0; adu_bin = 0;
    sao_done = 0; sao_req_valid = 0; sao_req_mode = BIN_REGULAR;
    mvd_done = 0; mvd_req_valid = 0; mvd_req_mode = BIN_REGULAR;
    intra_done = 0; intra_req_valid = 0; intra_req_mode = BIN_REGULAR;
    pu_done = 0; pu_req_valid = 0; pu_req_mode = BIN_REGULAR;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      // slice start
      send(CMD_SLICE);
      repeat ($urandom_range(1, 5)) begin
        #1 chk(!adu_init_req && !adu_req_valid, "no decoder init before contexts");
        @(negedge clk);
      end
      init_done = 1;
      @(negedge clk);
      init_done = 0;
      #1 chk(adu_init_req, "decoder init requested");
      repeat ($urandom_range(0, 3)) begin @(negedge clk); #1 chk(adu_init_req, "init held"); end
      adu_init_done = 1;
      @(negedge clk);
      adu_init_done = 0;
      #1 chk(cmd_ready && !adu_init_req, "idle after init");
      // block
      send(CMD_TU);
      repeat ($urandom_range(3, 10)) begin
        bsru_req_valid = $urandom_range(0, 1);
        bsru_req_mode  = bin_mode_e'($urandom_range(0, 1));
        #1 chk(adu_req_valid == bsru_req_valid && adu_req_mode == bsru_req_mode, "request routing");
        chk(!eos_valid, "no eos during block");
        @(negedge clk);
      end
      bsru_req_valid = 0;
      tu_done = 1;
      @(negedge clk);
      tu_done = 0;
      #1 chk(cmd_ready, "idle after block");
      bsru_req_valid = 1;
      #1 chk(!adu_req_valid, "parser requests blocked when idle");
      bsru_req_valid = 0;
      // SAO parameters
      send(CMD_SAO);
      repeat ($urandom_range(3, 10)) begin
        sao_req_valid  = $urandom_range(0, 1);
        sao_req_mode   = bin_mode_e'($urandom_range(0, 1));
        bsru_req_valid = $urandom_range(0, 1);
        bsru_req_mode  = bin_mode_e'($urandom_range(0, 1));
        #1 chk(adu_req_valid == sao_req_valid && (!sao_req_valid || adu_req_mode == sao_req_mode),
               "SAO request routing");
        @(negedge clk);
      end
      sao_req_valid = 0;
      bsru_req_valid = 0;
      sao_done = 1;
      @(negedge clk);
      sao_done = 0;
      #1 chk(cmd_ready && !adu_req_valid, "idle after SAO");
      // motion vector difference
      send(CMD_MVD);
      repeat ($urandom_range(3, 10)) begin
        mvd_req_valid  = $urandom_range(0, 1);
        mvd_req_mode   = bin_mode_e'($urandom_range(0, 1));
        sao_req_valid  = $urandom_range(0, 1);
        bsru_req_valid = $urandom_range(0, 1);
        bsru_req_mode  = bin_mode_e'($urandom_range(0, 1));
        #1 chk(adu_req_valid == mvd_req_valid && (!mvd_req_valid || adu_req_mode == mvd_req_mode),
               "MVD request routing");
        @(negedge clk);
      end
      mvd_req_valid = 0;
      sao_req_valid = 0;
      bsru_req_valid = 0;
      mvd_done = 1;
      @(negedge clk);
      mvd_done = 0;
      #1 chk(cmd_ready && !adu_req_valid, "idle after MVD");
      // intra prediction modes
      send(CMD_INTRA);
      repeat ($urandom_range(3, 10)) begin
        intra_req_valid  = $urandom_range(0, 1);
        intra_req_mode   = bin_mode_e'($urandom_range(0, 1));
        sao_req_valid  = $urandom_range(0, 1);
        bsru_req_valid = $urandom_range(0, 1);
        bsru_req_mode  = bin_mode_e'($urandom_range(0, 1));
        #1 chk(adu_req_valid == intra_req_valid && (!intra_req_valid || adu_req_mode == intra_req_mode),
               "intra request routing");
        @(negedge clk);
      end
      intra_req_valid = 0;
      sao_req_valid = 0;
      bsru_req_valid = 0;
      intra_done = 1;
      @(negedge clk);
      intra_done = 0;
      #1 chk(cmd_ready && !adu_req_valid, "idle after intra");
      // prediction unit: its own requests and those of the MVD sequencer it calls
      send(CMD_PU);
      repeat ($urandom_range(3, 10)) begin
        pu_req_valid   = $urandom_range(0, 1);
        pu_req_mode    = bin_mode_e'($urandom_range(0, 1));
        mvd_req_valid  = !pu_req_valid && $urandom_range(0, 1);
        mvd_req_mode   = bin_mode_e'($urandom_range(0, 1));
        sao_req_valid  = $urandom_range(0, 1);
        bsru_req_valid = $urandom_range(0, 1);
        bsru_req_mode  = bin_mode_e'($urandom_range(0, 1));
        #1 chk(adu_req_valid == (pu_req_valid || mvd_req_valid) &&
               (!pu_req_valid || adu_req_mode == pu_req_mode) &&
               (!mvd_req_valid || adu_req_mode == mvd_req_mode), "PU request routing");
        @(negedge clk);
      end
      pu_req_valid = 0;
      mvd_req_valid = 0;
      sao_req_valid = 0;
      bsru_req_valid = 0;
      pu_done = 1;
      @(negedge clk);
      pu_done = 0;
      #1 chk(cmd_ready && !adu_req_valid, "idle after PU");
      // end of slice flag
      send(CMD_END);
      #1 chk(adu_req_valid && adu_req_mode == BIN_TERM, "terminate request");
      adu_bin = $urandom_range(0, 1);
      adu_bin_valid = 1;
      #1 chk(eos_valid && eos_flag == adu_bin, "eos reported");
      @(negedge clk);
      adu_bin_valid = 0;
      #1 chk(!adu_req_valid && cmd_ready, "one terminate only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
