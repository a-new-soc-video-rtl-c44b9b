// gcr_detect: correlation of the averaged GCR with the stored reference.
//
// After start, the block computes for each lag l = 0 .. NLAG-1
//
//   c(l) = sum_{m=0}^{CORR_LEN-1} avg[m + l] * ref[m + NLAG/2]
//
// one product per clock, so the averaged line is searched for the
// reference from NLAG/2 samples early to NLAG/2-1 samples late. Every lag
// whose |c(l)| is a local maximum (larger than at l-1, not smaller than at
// l+1; outside the range counts as 0) is a peak: the main signal gives the
// strongest one and each echo a weaker one at its own delay. The NPK
// strongest peaks are kept sorted by magnitude in pk_mag / pk_lag (unused
// entries are 0); peak / peak_lag are the first entry. When all lags are done
// done pulses, and present says whether the strongest peak reached th (it
// validates the GCR). pk_lag - peak_lag is an echo's delay in samples,
// negative for a precursor, which a host can use to place filter sections.
// Both memories are read combinationally through the address outputs.
// The document gives the purpose (correlate with the stored reference, test
// the peak's intensity, one peak per echo with the main signal strongest);
// the serial correlator, the local-maximum rule and NPK are this design's.
// Timing: done is high NLAG * CORR_LEN + 2 clocks after the clock with start
// (one multiply-accumulate per clock, plus one clock to judge the last lag).
module gcr_detect
  import gc_pkg::*;
#(
  parameter int CORR_LEN = 256,
  parameter int NLAG     = 128,
  parameter int AW       = 10,
  parameter int PW       = 32,    // correlation word
  parameter int NPK      = 4      // peaks kept: main signal and 3 echoes
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [AW-1:0]        avg_addr,
  input  logic signed [DW-1:0] avg_data,
  output logic [AW-1:0]        ref_addr,
  input  logic signed [DW-1:0] ref_data,
  input  logic [PW-2:0]        th,
  output logic                 busy,
  output logic                 done,
  output logic                 present,
  output logic [PW-2:0]        peak,      // = pk_mag[0]
  output logic [$clog2(NLAG)-1:0] peak_lag,
  output logic [PW-2:0]        pk_mag [NPK],
  output logic [$clog2(NLAG)-1:0] pk_lag [NPK]
);
  localparam int LGW = $clog2(NLAG);
  localparam int MW  = $clog2(CORR_LEN);

  logic [LGW-1:0]       lag;
  logic [MW-1:0]        m;
  logic signed [PW-1:0] acc;
  logic signed [PW-1:0] acc_n;
  logic [PW-1:0]        mag;
  logic [PW-2:0]        mag1, mag2;   // |c| of the previous two lags
  logic                 tail;         // extra clock judging the last lag
  logic                 cand_v;       // lag-1 (or the last lag) is a peak
  logic [PW-2:0]        cand_mag;
  logic [LGW-1:0]       cand_lag;
  logic [PW-2:0]        ins_mag [NPK];
  logic [LGW-1:0]       ins_lag [NPK];

  assign avg_addr = AW'(m) + AW'(lag);
  assign ref_addr = AW'(m) + AW'(NLAG / 2);
  assign acc_n    = acc + PW'(avg_data) * PW'(ref_data);
  assign mag      = acc_n[PW-1] ? -acc_n : acc_n;

  // Peak candidate: when lag l finishes, lag l-1 is judged against both
  // neighbours; in the tail clock the last lag is judged against 0.
  always_comb begin
    if (tail) begin
      cand_v   = mag1 > mag2;
      cand_mag = mag1;
      cand_lag = lag;
    end else begin
      cand_v   = busy && m == MW'(CORR_LEN - 1) && lag != '0 &&
                 mag1 > mag2 && mag1 >= mag[PW-2:0];
      cand_mag = mag1;
      cand_lag = lag - 1'b1;
    end
  end

  // Sorted insertion of the candidate into the peak list.
  always_comb begin
    logic placed;
    placed = 1'b0;
    for (int i = 0; i < NPK; i++) begin
      ins_mag[i] = pk_mag[i];
      ins_lag[i] = pk_lag[i];
    end
    if (cand_v) begin
      for (int i = 0; i < NPK; i++) begin
        if (!placed && cand_mag > pk_mag[i]) begin
          placed = 1'b1;
          ins_mag[i] = cand_mag;
          ins_lag[i] = cand_lag;
          for (int j = i + 1; j < NPK; j++) begin
            ins_mag[j] = pk_mag[j-1];
            ins_lag[j] = pk_lag[j-1];
          end
        end
      end
    end
  end

  assign peak     = pk_mag[0];
  assign peak_lag = pk_lag[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lag      <= '0;
      m        <= '0;
      acc      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      present  <= 1'b0;
      tail     <= 1'b0;
      mag1     <= '0;
      mag2     <= '0;
      for (int i = 0; i < NPK; i++) begin
        pk_mag[i] <= '0;
        pk_lag[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        tail     <= 1'b0;
        lag      <= '0;
        m        <= '0;
        acc      <= '0;
        mag1     <= '0;
        mag2     <= '0;
        for (int i = 0; i < NPK; i++) begin
          pk_mag[i] <= '0;
          pk_lag[i] <= '0;
        end
      end else if (tail) begin
        tail    <= 1'b0;
        done    <= 1'b1;
        present <= ins_mag[0] >= th;
        pk_mag  <= ins_mag;
        pk_lag  <= ins_lag;
      end else if (busy) begin
        if (m == MW'(CORR_LEN - 1)) begin
          m      <= '0;
          acc    <= '0;
          mag2   <= mag1;
          mag1   <= mag[PW-2:0];
          pk_mag <= ins_mag;
          pk_lag <= ins_lag;
          if (lag == LGW'(NLAG - 1)) begin
            busy <= 1'b0;
            tail <= 1'b1;
          end else begin
            lag <= lag + 1'b1;
          end
        end else begin
          m   <= m + 1'b1;
          acc <= acc_n;
        end
      end
    end
  end
endmodule
