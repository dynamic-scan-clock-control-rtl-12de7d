// bist_controller: sequencer of the test-per-scan BIST.
//
// One BIST session applies NUM_PATTERNS pseudo-random vectors. Each vector is
// scanned in (scan_enable high for CHAIN_LEN shifts of the dynamic scan
// clock, counted on shift_en), then scan_enable drops for two fast cycles:
// one in which the combinational logic settles (SETTLE) and one in which the
// response is captured into the scan flip-flops (CAPTURE, capture_en high).
// The next scan-in shifts the captured response out into the signature
// register while the next vector enters; after the last capture one more
// scan pass unloads the last response. Every drop and rise of scan_enable
// starts a new scan-in at the slowest clock through the reset generator.
//
// lfsr_load and sar_clear are raised for one cycle at start. sar_en is high
// for shifts whose scan output is a captured response (not in the first
// pass, which unloads the reset contents). done stays high in DONE until the
// next start. The states, the settle cycle and the one-cycle capture on the
// fast clock are this design's choices; the document fixes the order scan-in,
// capture, overlapped scan-out. The number of patterns of the evaluated BIST
// circuits is not given, so the default of NUM_PATTERNS is this design's.
module bist_controller
  import dsc_pkg::*;
#(
  parameter int unsigned CHAIN_LEN    = 76714,
  parameter int unsigned NUM_PATTERNS = 4,
  parameter int unsigned LW           = $clog2(CHAIN_LEN + 1),
  parameter int unsigned PW           = $clog2(NUM_PATTERNS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          shift_en,
  output logic          scan_enable,
  output logic          capture_en,
  output logic          lfsr_load,
  output logic          lfsr_en,
  output logic          sar_clear,
  output logic          sar_en,
  output logic          busy,
  output logic          done,
  output logic [PW-1:0] patterns_applied,
  output bist_state_e   state
);

  logic [LW-1:0] shift_cnt;
  logic          last_shift;

  assign last_shift = shift_en && (shift_cnt == LW'(CHAIN_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= ST_IDLE;
      shift_cnt        <= '0;
      patterns_applied <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state            <= ST_SCAN;
            shift_cnt        <= '0;
            patterns_applied <= '0;
          end
        end
        ST_SCAN: begin
          if (shift_en) shift_cnt <= last_shift ? '0 : shift_cnt + 1'b1;
          if (last_shift) begin
            state <= (patterns_applied == PW'(NUM_PATTERNS)) ? ST_DONE : ST_SETTLE;
          end
        end
        ST_SETTLE: state <= ST_CAPTURE;
        ST_CAPTURE: begin
          state            <= ST_SCAN;
          patterns_applied <= patterns_applied + 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign scan_enable = (state == ST_SCAN);
  assign capture_en  = (state == ST_CAPTURE);
  assign lfsr_load   = (state == ST_IDLE || state == ST_DONE) && start;
  assign sar_clear   = lfsr_load;
  assign lfsr_en     = (state == ST_SCAN) && shift_en;
  assign sar_en      = (state == ST_SCAN) && shift_en && (patterns_applied != '0);
  assign busy        = (state != ST_IDLE) && (state != ST_DONE);
  assign done        = (state == ST_DONE);

  assert property (@(posedge clk) disable iff (!rst_n) !(scan_enable && capture_en));

endmodule
