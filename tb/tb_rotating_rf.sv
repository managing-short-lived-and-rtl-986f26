// tb_rotating_rf: checks the rotating register file against a logical-view
// reference model: a wave step shifts every value in the rotating region
// down by one logical entry (a value written at entry l is found at l-1 one
// wave later, modulo the region size), entries at or above the rotating size
// never move, and rot_entries = 0 gives a plain register file. Also checks
// that a value survives ENTRIES waves, i.e. lives ENTRIES*II cycles without
// being rewritten, and that both read ports work.
module tb_rotating_rf;
  localparam int unsigned ENTRIES = 8, W = 32, NRD = 2, AW = 3;
  logic clk = 0, rst_n = 0;
  logic [AW:0] rot_entries;
  logic wave_inc = 0, we = 0;
  logic [AW-1:0] waddr = 0;
  logic [W-1:0] wdata = 0;
  logic [NRD-1:0][AW-1:0] raddr = '0;
  logic [NRD-1:0][W-1:0] rdata;
  logic [AW-1:0] wave;
  logic [W-1:0] lv [ENTRIES];   // logical view
  int checks = 0, failures = 0;

  rotating_rf #(.ENTRIES(ENTRIES), .W(W), .NRD(NRD)) dut (
    .clk(clk), .rst_n(rst_n), .rot_entries(rot_entries), .wave_inc(wave_inc),
    .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata), .wave(wave));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one cycle of controls and update the model
  task automatic step(input logic dwe, input int wa, input logic [W-1:0] wd, input logic dinc, input int r);
    logic [W-1:0] tmp [ENTRIES];
    we = dwe; waddr = AW'(wa); wdata = wd; wave_inc = dinc;
    @(negedge clk);
    we = 0; wave_inc = 0;
    if (dwe) lv[wa] = wd;
    if (dinc && r > 0) begin
      for (int l = 0; l < ENTRIES; l++) tmp[l] = lv[l];
      for (int l = 0; l < r; l++) lv[l] = tmp[(l + 1) % r];
    end
  endtask

  task automatic check_all(input string what);
    for (int l = 0; l < ENTRIES; l += 2) begin
      raddr[0] = AW'(l); raddr[1] = AW'(l + 1);
      #1;
      checks += 2;
      if (rdata[0] !== lv[l])   begin failures++; $display("FAIL %s l=%0d got %h exp %h", what, l,   rdata[0], lv[l]); end
      if (rdata[1] !== lv[l+1]) begin failures++; $display("FAIL %s l=%0d got %h exp %h", what, l+1, rdata[1], lv[l+1]); end
    end
  endtask

  initial begin
    int rots[4] = '{8, 4, 0, 6};
    rot_entries = 4'd8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (rots[k]) begin
      // new configuration: reset, set size
      rst_n = 0; rot_entries = (AW+1)'(rots[k]);
      @(negedge clk);
      rst_n = 1;
      for (int l = 0; l < ENTRIES; l++) lv[l] = '0;
      for (int l = 0; l < ENTRIES; l++) step(1, l, $urandom, 0, rots[k]);
      check_all("fill");
      for (int n = 0; n < 200; n++) begin
        step($urandom_range(0, 1), $urandom_range(0, ENTRIES-1), $urandom, $urandom_range(0, 1), rots[k]);
        check_all($sformatf("rot=%0d n=%0d", rots[k], n));
      end
    end
    // lifetime: with all 8 entries rotating a value written once at logical 7
    // is read at logical 7-k after k waves, for k up to 7
    rst_n = 0; rot_entries = 4'd8;
    @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < ENTRIES; l++) lv[l] = '0;
    step(1, 7, 32'hCAFE0007, 0, 8);
    for (int k = 0; k < 8; k++) begin
      raddr[0] = AW'(7 - k);
      #1;
      checks++;
      if (rdata[0] !== 32'hCAFE0007) begin failures++; $display("FAIL lifetime k=%0d", k); end
      step(0, 0, 0, 1, 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
