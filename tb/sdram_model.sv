// sdram_model: behavioural model of the SDR SDRAM array behind the FIFO
// memory block (four chip selects, four banks each, 4096 rows of 512 columns
// of 32-bit words), for simulation only.
//
// On each rising clk edge with cke high it decodes {ras_n, cas_n, we_n} for
// the selected chips: MRS (CAS latency from a[6:4]), REF, PRE (a[10]: all
// banks), ACT, WRITE and READ with burst length 1 and no auto precharge.
// Written words are kept in an associative array indexed by the 25-bit word
// address {chip, bank, row, column}; unwritten words read as zero. Read data
// is driven on dq_out so that it is sampled on the CAS-latency-th edge after
// the READ, as a real device's output is.
//
// Protocol checks, each counted in violations: commands before the mode
// register is loaded, ACT to an open bank, READ/WRITE to a closed bank or with
// a[10] set, WRITE without dq_oe, tRCD, tRP, tRC, tRAS, tWR and tMRD shorter
// than the given cycle counts, REF or MRS with a bank open, data-bus
// contention, and a refresh interval longer than MAX_REF_GAP cycles. The
// command counters are outputs for testbench statistics.
module sdram_model #(
  parameter int unsigned T_RCD       = 2,
  parameter int unsigned T_RP        = 2,
  parameter int unsigned T_RC        = 7,
  parameter int unsigned T_RAS       = 5,
  parameter int unsigned T_WR        = 2,
  parameter int unsigned T_MRD       = 2,
  parameter int unsigned MAX_REF_GAP = 820
) (
  input  logic        clk,
  input  logic        cke,
  input  logic [3:0]  cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [11:0] a,
  input  logic        dqm,
  input  logic [31:0] dq_in,
  input  logic        dq_oe,
  output logic [31:0] dq_out,
  output int          violations,
  output int          n_ref,
  output int          n_act,
  output int          n_write,
  output int          n_read,
  output int          n_read_cl3,
  output int          n_mrs,
  output int          n_write_chip [4]
);
  logic [31:0] mem [int unsigned];
  longint      cyc;
  int          cl;
  bit          mode_set;
  bit          open_q   [4][4];
  logic [11:0] row_q    [4][4];
  longint      act_t    [4][4];
  longint      last_pre, last_ref, last_write, last_mrs, last_ref_gap;
  bit          drv;
  bit          rd_v [8];
  logic [31:0] rd_d [8];

  initial begin
    cyc = 0; cl = 2; mode_set = 0; violations = 0;
    n_ref = 0; n_act = 0; n_write = 0; n_read = 0; n_read_cl3 = 0; n_mrs = 0;
    last_pre = -100; last_ref = -100; last_ref_gap = 0; last_write = -100; last_mrs = -100;
    drv = 0; dq_out = '0;
    for (int c = 0; c < 4; c++) begin
      n_write_chip[c] = 0;
      for (int b = 0; b < 4; b++) begin open_q[c][b] = 0; row_q[c][b] = '0; act_t[c][b] = -100; end
    end
    for (int i = 0; i < 8; i++) begin rd_v[i] = 0; rd_d[i] = '0; end
  end

  function automatic void viol(string what);
    violations++;
    $display("SDRAM model: %s at cycle %0d (time %0t)", what, cyc, $time);
  endfunction

  always @(posedge clk) begin
    logic [2:0] cmd;
    int         chip;
    int         nsel;
    logic [24:0] addr;
    cyc++;
    // read data output: slot 1 is driven now and sampled on the next edge
    if (drv && dq_oe) viol("data bus contention");
    drv    = rd_v[1];
    dq_out <= rd_v[1] ? rd_d[1] : '0;
    for (int i = 0; i < 7; i++) begin rd_v[i] = rd_v[i+1]; rd_d[i] = rd_d[i+1]; end
    rd_v[7] = 0;

    cmd  = {ras_n, cas_n, we_n};
    if (!cke) mode_set = 0;   // clock disabled: device must be initialised again
    nsel = 0; chip = 0;
    for (int c = 0; c < 4; c++) if (!cs_n[c]) begin nsel++; chip = c; end
    if (mode_set && (cyc - last_ref_gap > MAX_REF_GAP)) begin
      viol("refresh interval exceeded");
      last_ref_gap = cyc;
    end
    if (cke && nsel != 0 && cmd != 3'b111) begin
      case (cmd)
        3'b000: begin // MRS
          for (int c = 0; c < 4; c++) for (int b = 0; b < 4; b++) if (open_q[c][b]) viol("MRS with open bank");
          if (cyc - last_pre < T_RP) viol("tRP before MRS");
          cl = int'(a[6:4]);
          if (cl != 2 && cl != 3) viol("unsupported CAS latency");
          mode_set = 1; n_mrs++; last_mrs = cyc; last_ref_gap = cyc;
        end
        3'b001: begin // REF
          for (int c = 0; c < 4; c++) for (int b = 0; b < 4; b++) if (open_q[c][b]) viol("REF with open bank");
          if (cyc - last_pre < T_RP) viol("tRP before REF");
          if (cyc - last_ref < T_RC && mode_set) viol("tRC between REF");
          last_ref = cyc; last_ref_gap = cyc;
          if (mode_set) n_ref++;
        end
        3'b010: begin // PRE
          if (cyc - last_write < T_WR) viol("tWR");
          for (int c = 0; c < 4; c++) if (!cs_n[c]) for (int b = 0; b < 4; b++)
            if (a[10] || b == int'(ba)) begin
              if (open_q[c][b] && cyc - act_t[c][b] < T_RAS) viol("tRAS");
              open_q[c][b] = 0;
            end
          last_pre = cyc;
        end
        default: begin
          if (!mode_set) viol("access before mode register set");
          if (cyc - last_mrs < T_MRD) viol("tMRD");
          if (nsel != 1) viol("access with several chips selected");
          addr = {2'(chip), ba, row_q[chip][ba], a[8:0]};
          case (cmd)
            3'b011: begin // ACT
              if (open_q[chip][ba]) viol("ACT to open bank");
              if (cyc - last_pre < T_RP) viol("tRP");
              if (cyc - last_ref < T_RC) viol("tRC after REF");
              open_q[chip][ba] = 1; row_q[chip][ba] = a; act_t[chip][ba] = cyc; n_act++;
            end
            3'b100: begin // WRITE
              if (!open_q[chip][ba]) viol("WRITE to closed bank");
              if (cyc - act_t[chip][ba] < T_RCD) viol("tRCD before WRITE");
              if (a[10]) viol("auto precharge not expected");
              if (!dq_oe) viol("WRITE without driven data");
              if (dqm) viol("masked write not expected");
              mem[addr] = dq_in; last_write = cyc; n_write++; n_write_chip[chip]++;
            end
            3'b101: begin // READ
              if (!open_q[chip][ba]) viol("READ to closed bank");
              if (cyc - act_t[chip][ba] < T_RCD) viol("tRCD before READ");
              if (a[10]) viol("auto precharge not expected");
              rd_v[cl-1] = 1;
              rd_d[cl-1] = mem.exists(addr) ? mem[addr] : 32'h0;
              n_read++;
              if (cl == 3) n_read_cl3++;
            end
            default: viol("unexpected command");
          endcase
        end
      endcase
    end
  end
endmodule
