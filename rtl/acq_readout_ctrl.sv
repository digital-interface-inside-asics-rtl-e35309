// acq_readout_ctrl: digital memory of a ROC chip with its acquisition,
// conversion hand-over and readout control.  Runs on the gated slow clock.
//
// Acquisition: while StartAcquisition is high (it acts on its level), each
// clock with trigger high writes one frame {chip ID, bunch-crossing ID,
// hit bits} into the memory.  The bunch-crossing ID counts clocks from the
// start of the acquisition.  The memory has 128 locations behind a 7-bit
// pointer but accepts only 127 frames, so a full memory never brings the
// pointer back to its empty value.  A full memory raises ChipSat, which
// tells the DAQ to stop the acquisition.
//
// Conversion: when StartAcquisition falls, ChipSat is raised (or stays
// high).  It falls when the conversion, started by the DAQ, has run: the
// conversion timer's busy flag (fast clock domain, synchronised here) has
// been seen high and then low.
//
// Readout: a StartReadOutInt pulse starts shifting out exactly the frames
// that were written, first to last, most significant bit first, one bit
// per clock on data with transmit_on high, with no gap between frames.  No
// frame is read from a location that was not written.  Then end_readout
// is held high for ERO_CYCLES clocks: the pulse must outlast the LVDS
// start-up time of the next chip.  The memory is then empty again.
//
// Timing: N frames take N*FRAME_W clocks of transmit_on, starting on the
// clock after StartReadOutInt is sampled; end_readout follows on the next
// clock.  From the original description: the 127-frame limit, ChipSat in
// place of RamFull, StartAcquisition on level, ChipSat order in the
// acquisition/conversion/readout sequence, no frame read that was not
// written.  Own choices: frame layout, bit order, readout order, pulse
// length, synchronous-read memory.
module acq_readout_ctrl
  import roc_pkg::*;
#(
  parameter int unsigned FRAMES     = MEM_FRAMES,
  parameter int unsigned ADDR_W     = MEM_ADDR_W,
  parameter int unsigned ERO_CYCLES = 8
) (
  input  logic                clk,
  input  logic                rstb,
  input  logic [CHIPID_W-1:0] chip_id,
  input  logic                start_acq,
  input  logic                trigger,
  input  logic [HIT_W-1:0]    hit,
  input  logic                conv_busy,     // from conv_timer, other clock
  input  logic                start_ro,      // StartReadOutInt
  output logic                chip_sat,
  output logic                data,
  output logic                transmit_on,
  output logic                end_readout,
  output logic [ADDR_W-1:0]   frame_count
);

  typedef logic [FRAME_W-1:0] frame_t;

  typedef enum logic [2:0] {
    S_IDLE, S_ACQ, S_SAT, S_READY, S_SHIFT, S_END
  } state_t;

  state_t               state;
  frame_t               mem [2**ADDR_W];
  logic [BCID_W-1:0]    bcid;
  logic [ADDR_W-1:0]    rd_ptr;
  frame_t               shreg;
  logic [$clog2(FRAME_W)-1:0] bitcnt;
  logic [$clog2(ERO_CYCLES+1)-1:0] ero_cnt;
  logic                 busy1, busy2, busy_seen;
  logic                 full;

  assign full = (frame_count == ADDR_W'(FRAMES));

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) {busy1, busy2} <= 2'b00;
    else       {busy1, busy2} <= {conv_busy, busy1};
  end

  // memory write port
  always_ff @(posedge clk) begin
    if (state == S_ACQ && start_acq && trigger && !full)
      mem[frame_count] <= {chip_id, bcid, hit};
  end

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      state       <= S_IDLE;
      frame_count <= '0;
      bcid        <= '0;
      rd_ptr      <= '0;
      shreg       <= '0;
      bitcnt      <= '0;
      ero_cnt     <= '0;
      busy_seen   <= 1'b0;
      end_readout <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          bcid <= '0;
          if (start_acq) begin
            state       <= S_ACQ;
            frame_count <= '0;
          end else if (start_ro) begin
            state       <= S_END;    // nothing stored: pass the token on
            end_readout <= 1'b1;
          end
        end
        S_ACQ: begin
          bcid <= bcid + 1'b1;
          if (!start_acq) begin
            state     <= S_SAT;
            busy_seen <= 1'b0;
          end else if (trigger && !full) begin
            frame_count <= frame_count + 1'b1;
          end
        end
        S_SAT: begin
          if (busy2) busy_seen <= 1'b1;
          else if (busy_seen) state <= S_READY;
        end
        S_READY: begin
          if (start_ro) begin
            rd_ptr <= '0;
            if (frame_count == '0) begin
              state       <= S_END;
              end_readout <= 1'b1;
            end else begin
              state  <= S_SHIFT;
              shreg  <= mem[ADDR_W'(0)];
              bitcnt <= '0;
            end
          end
        end
        S_SHIFT: begin
          if (bitcnt == ($bits(bitcnt))'(FRAME_W - 1)) begin
            bitcnt <= '0;
            if (rd_ptr + 1'b1 == frame_count) begin
              state       <= S_END;
              end_readout <= 1'b1;
            end else begin
              rd_ptr <= rd_ptr + 1'b1;
              shreg  <= mem[rd_ptr + 1'b1];
            end
          end else begin
            bitcnt <= bitcnt + 1'b1;
            shreg  <= shreg << 1;
          end
        end
        S_END: begin
          if (ero_cnt == ($bits(ero_cnt))'(ERO_CYCLES - 1)) begin
            ero_cnt     <= '0;
            end_readout <= 1'b0;
            frame_count <= '0;
            state       <= S_IDLE;
          end else begin
            ero_cnt <= ero_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign chip_sat    = (state == S_SAT) || (state == S_ACQ && full);
  assign transmit_on = (state == S_SHIFT);
  assign data        = transmit_on & shreg[FRAME_W-1];

endmodule
