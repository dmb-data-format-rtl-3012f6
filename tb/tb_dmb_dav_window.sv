// tb_dmb_dav_window: checks the DAV x L1A coincidence window.
//
// A timeline of L1As (12 BXs apart) and of DAV, MOVLP and CFEB_ACTIVE pulses
// at random offsets of delay-2 .. delay+2 BXs after each L1A is played into
// the block. The expected record for each L1A is the OR of each line over
// the three BXs delay-1 .. delay+1 after it. Checks every record and that it
// is written exactly delay+1 BXs after its L1A. Runs with l1a_delay = 5 and
// l1a_delay = 0.
module tb_dmb_dav_window;
  import dmb_pkg::*;

  localparam int T     = 200;
  localparam int SPACE = 12;

  logic              clk = 1'b0;
  logic              rst, sync_rst, l1a_in, rd, empty, full;
  logic [7:0]        l1a_delay;
  logic [N_FEB-1:0]  dav;
  logic [N_CFEB-1:0] cfeb_movlp, tmb_cfeb_active;
  dav_rec_t          rdata;
  logic [9:0]        count;
  int                checks = 0, failures = 0;

  logic [N_FEB-1:0]  dav_t  [T];
  logic [N_CFEB-1:0] movl_t [T];
  logic [N_CFEB-1:0] act_t  [T];
  logic              l1a_t  [T];

  dmb_dav_window dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input int n = 1);
    repeat (n) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(input int dly);
    int n_l1a;
    dav_rec_t exp_q[$];
    int       due[$];
    for (int t = 0; t < T; t++) begin
      dav_t[t] = '0; movl_t[t] = '0; act_t[t] = '0; l1a_t[t] = 1'b0;
    end
    // L1As at 10, 22, 34, ...; pulses at delay-2 .. delay+2 after each
    for (int j = 10; j + dly + 3 < T - 10; j += SPACE) begin
      l1a_t[j] = 1'b1;
      for (int f = 0; f < N_FEB; f++) begin
        int o;
        o = j + dly + $urandom_range(0, 4) - 2;
        if ($urandom_range(0, 3) != 0) dav_t[o][f] = 1'b1;
      end
      for (int f = 0; f < N_CFEB; f++) begin
        int o;
        o = j + dly + $urandom_range(0, 4) - 2;
        if ($urandom_range(0, 2) == 0) movl_t[o][f] = 1'b1;
        o = j + dly + $urandom_range(0, 4) - 2;
        if ($urandom_range(0, 1) == 0) act_t[o][f] = 1'b1;
      end
    end
    // expected records
    for (int j = 0; j < T; j++) begin
      if (l1a_t[j]) begin
        logic [N_FEB-1:0]  d;
        logic [N_CFEB-1:0] m, a;
        dav_rec_t r;
        d = '0; m = '0; a = '0;
        for (int t = j + dly - 1; t <= j + dly + 1; t++) begin
          if (t >= 0) begin
            d = d | dav_t[t]; m = m | movl_t[t]; a = a | act_t[t];
          end
        end
        r.cfeb_dav = d[4:0]; r.alct_dav = d[5]; r.tmb_dav = d[6];
        r.cfeb_active = a; r.cfeb_movlp = m;
        exp_q.push_back(r);
        due.push_back(j + dly + 1);
      end
    end
    n_l1a = exp_q.size();
    l1a_delay = 8'(dly);
    // play the timeline; after tick t the records due by t must be stored
    for (int t = 0; t < T; t++) begin
      int n_due;
      l1a_in = l1a_t[t]; dav = dav_t[t]; cfeb_movlp = movl_t[t]; tmb_cfeb_active = act_t[t];
      tick();
      n_due = 0;
      foreach (due[k]) if (due[k] <= t) n_due++;
      if (t > 0 && (due.size() > 0) && (t == due[0] || t == due[0] - 1 || t == due[0] + 1))
        expect_eq(32'(count), n_due, $sformatf("record count at BX %0d", t));
    end
    l1a_in = 1'b0; dav = '0; cfeb_movlp = '0; tmb_cfeb_active = '0;
    expect_eq(32'(count), n_l1a, "records");
    foreach (exp_q[k]) begin
      expect_eq(32'(rdata), 32'(exp_q[k]), $sformatf("record %0d", k));
      rd = 1'b1;
      tick();
      rd = 1'b0;
    end
    expect_eq(32'(empty), 1, "empty");
  endtask

  initial begin
    rst = 1'b1; sync_rst = 1'b0; l1a_in = 1'b0; rd = 1'b0; l1a_delay = '0;
    dav = '0; cfeb_movlp = '0; tmb_cfeb_active = '0;
    tick(3);
    rst = 1'b0;
    tick();
    run(5);
    run(0);
    run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
