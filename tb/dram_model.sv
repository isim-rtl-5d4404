// Behavioural model of the SDRAM chips behind one slave memory controller,
// for simulation only. It decodes the SMC's commands (ACT, RD, WR, PRE, REF),
// stores lines in a sparse array keyed by line address and returns read data
// T_AA cycles after the RD command. Unwritten memory reads as a fixed
// pattern: each 32-bit word holds its own byte address, so any object's
// expected value follows from its address. It also checks that RD/WR go to
// the row that was opened in that bank.
module dram_model
  import impulse_pkg::*;
#(
  parameter int SMC_ID  = 0,
  parameter int NUM_SMC = 4,
  parameter int T_AA    = 3
) (
  input  logic        clk,
  input  logic        cmd_valid,
  input  logic [2:0]  cmd,
  input  logic        bank,
  input  logic [17:0] row,
  input  logic [3:0]  col,
  input  line_t       wdata,
  input  mask_t       wmask,
  output logic        dq_valid,
  output line_t       dq
);
  line_t mem [logic [PA_W-OFF_W-1:0]];
  logic [17:0] open_row [2];
  logic        is_open  [2];
  int          errors = 0;
  logic        pipe_v [T_AA];
  line_t       pipe_d [T_AA];

  function automatic line_t pattern(logic [PA_W-OFF_W-1:0] la);
    line_t l;
    for (int i = 0; i < LINE_BYTES / 4; i++) l[32*i +: 32] = {la, 7'd0} + 32'(4 * i);
    return l;
  endfunction

  function automatic line_t rd(logic [PA_W-OFF_W-1:0] la);
    return mem.exists(la) ? mem[la] : pattern(la);
  endfunction

  function automatic void bd_write(addr_t a, line_t l);
    mem[a[PA_W-1:OFF_W]] = l;
  endfunction

  function automatic logic [PA_W-OFF_W-1:0] la_of(logic b, logic [17:0] r, logic [3:0] c);
    logic [2:0] gb;
    gb = 3'(int'(b) * NUM_SMC + SMC_ID);
    return {r, c, gb};
  endfunction

  initial begin
    for (int i = 0; i < T_AA; i++) pipe_v[i] = 1'b0;
    is_open[0] = 1'b0; is_open[1] = 1'b0;
  end

  assign dq_valid = pipe_v[T_AA-1];
  assign dq       = pipe_d[T_AA-1];

  always_ff @(posedge clk) begin
    for (int i = T_AA - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (cmd_valid) begin
      case (cmd)
        3'd1: begin open_row[bank] <= row; is_open[bank] <= 1'b1; end
        3'd4: is_open[bank] <= 1'b0;
        3'd2: begin
          if (!is_open[bank] || open_row[bank] != row) errors++;
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= rd(la_of(bank, row, col));
        end
        3'd3: begin
          line_t l;
          if (!is_open[bank] || open_row[bank] != row) errors++;
          l = rd(la_of(bank, row, col));
          for (int b = 0; b < LINE_BYTES; b++) if (wmask[b]) l[8*b +: 8] = wdata[8*b +: 8];
          mem[la_of(bank, row, col)] = l;
        end
        3'd5: if (is_open[0] || is_open[1]) errors++;
        default: ;
      endcase
    end
  end
endmodule
