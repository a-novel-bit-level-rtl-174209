# Group distributed arithmetic for prime-length sinusoidal transforms

A transform such as a DCT, DFT or DHT of prime length N can be rewritten
(by reordering the inputs and outputs with a primitive root of N) as a cyclic
convolution of length N-1 with fixed coefficients. Distributed arithmetic (DA)
evaluates such a product without multipliers: the inputs are fed one bit at a
time, the N bits of one bit position form a memory address, and a table holds
every possible sum of coefficients. The table has 2^N rows of N words, which
quickly becomes impractical.

Group distributed arithmetic (GDA) shrinks that table using the cyclic
structure of the convolution. If address V is a cyclic rotation of address S,
then the N partial products for V are the N partial products for S rotated by
the same amount. Every address therefore belongs to a *group* of rotations.
Only one row per group is stored, and a barrel rotator puts the words back in
order. For N = 3, 5 and 7 the 8, 32 and 128 rows of plain DA become 4, 8 and 20
rows.

This repository implements GDA as reusable SystemVerilog parts, and on them
four complete transform engines:

* a 1-D **7-point DCT** that takes a block of 7 samples every 32 clocks;
* a 1-D **11-point DFT** of real data, one block every 11 clocks;
* a 1-D **11-point DHT**, which is the same engine in its second mode;
* a 1-D **29-point DHT** built from four 7-point GDA lookups, one block
  every 32 clocks.

Beside them is an iterative **CORDIC complex multiplier**. It is the rotator
that pairs with GDA for the complex pre- and post-multiplications that turn
a DFT of any length into a cyclic convolution.

`gda_dsst_top` places the four engines and the CORDIC side by side. Each has
its own streaming ports.

## The GDA unit

A GDA unit (`gda_unit`) computes the cyclic convolution

    u_k = sum_n e_((n-k) mod N) * c_n,    k = 0..N-1

for N signed words e_n of L bits and N fixed coefficients c_n. It has four
parts:

| part | module | what it does |
|---|---|---|
| address decoder | `gda_addr_decoder` | maps the N-bit address V (bit n = bit q of e_n) to a group number and a rotating factor r |
| group memory | `gda_group_rom` | one N-word row per group: word k of the row for seed S is sum_n S[(n-k) mod N] * c_n |
| barrel rotator | `gda_barrel_rotator` | word k of the output is word (k+r) mod N of the row, built from log2 N shift stages |
| accumulator bank | `gda_accumulator` | N shift-accumulators, MSB first |

**Groups and seeds.** The *seed* of a group is its smallest rotation, read as
an unsigned number. Groups are numbered by increasing seed. For N = 5 this
gives seeds 0, 1, 3, 5, 7, 11, 15 and 31 for groups 0 to 7. The rotating
factor r is the smallest r for which rotating the seed left by r bits (bit i
moves to bit (i+r) mod N) gives V. Because rotating the address rotates the
partial products the same way, the rotator only has to turn the stored row by
r words.

The decoder and memory contents are not written out by hand. Constant
functions in `gda_pkg` (`seed_of`, `rot_of`, `group_of`, `seed_of_group`)
compute them during elaboration, so any N up to 8 and any coefficient set
elaborate to fixed lookup logic. For example, `gda_unit #(.N(7), .COEF(...))`
gives the 20-group, 7-word unit.

**Accumulation.** Words are two's complement and sent MSB first. In the
sign-bit cycle (`first = 1`) the accumulator loads the negative of the partial
product. In each later cycle it computes `acc = 2*acc + pp`. After L cycles
`acc[k]` holds u_k exactly, as an integer. No rounding happens inside a unit.
`en = 0` holds the state.

## 7-point DCT (`dct7_gda`)

The engine computes Y(k) = sum_n y(n) cos(pi (2n+1) k / 14) for k = 0..6:

    x(6) = y(6),   x(n) = y(n) - x(n+1)              (n = 5..0)
    Y(0) = sum_n y(n)
    Y(k) = [ 2 T(k) + x(0) ] * cos(pi k / 14)          (k = 1..6)
    T(k) = sum_{n=1..6} x(n) cos(pi n k / 7)

The six kernel outputs form two 3-point cyclic convolutions with the same
coefficients {cos 2a, cos 6a, cos 4a}, a = pi/7:

* even outputs [T(2), T(6), T(4)] from the sums
  e = {x(6)+x(1), x(4)+x(3), x(2)+x(5)};
* odd outputs [T(5), T(1), T(3)] from the differences of the same pairs.

So one GDA unit, with a single 4-row x 3-word group memory, computes all six
kernel outputs in two passes.

Four stages run as a pipeline, each working on a different block:

1. **`dct7_preproc`** collects 7 samples in a shift register and sums them
   for Y(0). It then shifts back the other way for 7 cycles, building
   x(6), x(5), ..., x(0) with one subtractor and one register. It holds the
   result until the kernel takes it.
2. **`dct7_kernel`** forms the three sums and three differences. It loads
   them into 16-bit parallel-in/serial-out registers and runs the GDA unit
   for 16 cycles on the sums, then 16 on the differences. A new block is
   taken in the last cycle of the odd pass, so the unit is never idle under
   a continuous input.
3. **`dct7_postproc`** computes (2T + x(0)) * cos(pi k/14) for each triple
   with three bit-serial shift-and-add multipliers, one coefficient bit per
   cycle, 16 cycles. The x2 is a wiring shift.
4. **`dct7_outbuf`** collects the even triple. When the odd triple arrives
   it loads all seven results with Y(0) into a drain register, which puts
   out Y(0), Y(1), ..., Y(6) on seven consecutive clocks.

**Timing.** One block per 32 clocks, at one sample per clock while a block
is filled. Y(0) appears 59 clocks after the clock that took the block's
last sample, and Y(1)..Y(6) follow on the next six clocks. In round
numbers: 7 clocks of reverse shifting, 32 for the two DA passes, 16 for the
odd-triple multiply, and a few hand-over registers.

**Numbers.** Input: 8-bit signed. x(n) and Y(0) are carried in 11 bits. The
kernel coefficients and the output cosines are rounded to Q1.14:
{10215, -14761, -3646} and 16384·cos(pi k/14) = {16384, 15973, 14761,
12810, 10215, 7109, 3646}. The output is 18-bit signed with 6 fraction
bits (Y·64), obtained by flooring. The testbenches check the output
bit-exactly against an integer model of that arithmetic. They also check
it against the exact real-valued DCT to within ±1.5, in real units. For
comparison, outputs reach about ±900 for full-scale input.

## 11-point DFT and DHT (`p11_gda`)

For N = 11 the generator 2 orders the indices 1..10 as 2^i mod 11:
1, 2, 4, 8, 5, 10, 9, 7, 3, 6. With that ordering the ten non-DC outputs
are a 10-point cyclic convolution of the reordered inputs. Its coefficient
sequence has a useful property. After five steps the cosines repeat, and
the sines repeat with the opposite sign, because 2^5 = -1 mod 11. So five
outputs are computed and the other five come from sums and differences.

The input buffer splits the block into two 5-word vectors:

    a = { x(1), x(9), x(4), x(3), x(5) }
    b = { x(10), x(2), x(7), x(8), x(6) }

Then:

    R_p = sum_m (a+b)[(m-p) mod 5] * c_m,   c_m  = cos(2 pi 2^m / 11)
    I_p = sum_m (a-b)[(m-p) mod 5] * s'_m,  s'_m = (-1)^m sin(2 pi 2^m / 11)

The sine half is negacyclic. Taking every other position of a and b in the
swapped order, and giving the sine coefficients alternating signs, makes it
an ordinary cyclic convolution, because 5 is odd. With S_p = (-1)^p I_p:

    DFT:  Y(k_lo) = x(0) + R_p - j S_p,   Y(k_hi) = x(0) + R_p + j S_p
    DHT:  H(k_lo) = x(0) + R_p + S_p,     H(k_hi) = x(0) + R_p - S_p
    k_lo = 1, 2, 4, 8, 5   and   k_hi = 10, 9, 7, 3, 6   for p = 0..4

and Y(0) = H(0) is the plain sum.

**Datapath.** `p11_da` shifts the a and b words out MSB first for 8 cycles
(the DA word is the 8-bit input). The a bits and the b bits each go through
an address decoder. Each decoder output feeds a cosine group memory and a
sine group memory (8 rows of 5 words each). The a and b lookups are added for
the cosine side and subtracted for the sine side. Two accumulator banks then
collect R and I. Because DA is linear in the inputs, adding the partial
products of a and b is the same as convolving a + b. This gives the sum and
difference without widening the serial words. `p11_outbuf` forms the eleven
outputs with adders and streams them in natural order, one per clock.
The parameter `XFORM` (`XFORM_DFT` or `XFORM_DHT`, an enum in `gda_pkg`)
selects the output combination. It is the only difference between the two
transforms.

**Timing.** Eleven samples in at one per clock. The buffer hands a full block
to the DA stage in the same clock that it takes the next block's first
sample, so a continuous stream runs at one block per 11 clocks. The DA
stage needs only 8 of them. Y(0) leaves 11 clocks after the clock that took
the block's last sample. Y(1)..Y(10) follow on the next ten clocks.

**Numbers.** Input: 8-bit signed. Coefficients: Q1.12, i.e.
c = {3446, 1702, -2682, -583, -3930} and s' = {2214, -3726, 3096, 4054, 1154}.
Accumulators are 25 bits. Outputs are 16-bit signed with 4 fraction bits
(value·16), obtained by flooring. For the DHT `out_im` is 0. The testbench
checks the outputs bit-exactly against an integer model. It also checks them
against the exact real DFT/DHT to within ±0.5 (real units).

## 29-point DHT (`dht29_gda`)

The engine computes H(k) = sum_n x(n) cas(2 pi n k / 29), with
cas = cos + sin. H(0) is the plain sum. The generator 2 turns the other 28
outputs into a 28-point cyclic convolution:

    H(2^i) = x(0) + T(2^i),   T(2^i) = sum_j x(2^(j-i) mod 29) * cas(2 pi 2^j / 29)

A 28-point convolution is too long for one GDA memory (2^28 addresses). It
is split 4 x 7: position j goes to block j mod 4, word j mod 7. Because 4
and 7 are coprime, the 28 x 28 circulant matrix becomes a 4 x 4
block-circulant matrix of 7 x 7 circulants. The four input blocks are

    { x(1),  x(24), x(25), x(20), x(16), x(7),  x(23) }
    { x(17), x(2),  x(19), x(21), x(11), x(3),  x(14) }
    { x(28), x(5),  x(4),  x(9),  x(13), x(22), x(6)  }
    { x(12), x(27), x(10), x(8),  x(18), x(26), x(15) }

and output block i is the sum over a of the 7-point convolution of
coefficient block a with input block (a - i) mod 4. The coefficient blocks
hold cas(2 pi m / 29) for the same index pattern m (`gda_pkg::DHT29_MAP`).

**Datapath.** Four GDA lookups (`gda_lookup`: decoder output into a 20-row
group memory and a 7-word barrel rotator) each hold one coefficient block.
Four 7-bit address decoders feed them. Lookup a reads the serial bits of
input block (a - i) mod 4 in iteration i. After each iteration the input
blocks are reloaded from a holding register, rotated by one block. The
four lookups' partial products are added before a single 7-word
accumulator bank. By linearity that is the same as adding the four
convolutions, and it needs one bank instead of four. Four iterations of 8
bit cycles give all 28 outputs. Each iteration's seven results go to a
collection register at their output indices. The last iteration's results
go, with x(0) added and H(0) alongside, straight into a drain register. It
puts out H(0), H(1), ..., H(28) on consecutive clocks.

**Timing.** A 29-word input shift register fills while the DA stage works
on the previous block. A continuous stream runs at one block per 32 clocks,
so the input is stalled 3 clocks in every 32. H(0) leaves 35 clocks after the
clock that took the block's last sample.

**Numbers.** Input: 8-bit signed. Coefficients: Q1.12, rounded
4096·cas(2 pi m / 29). Group memory words are 16 bits, the sum of four
lookups 18 bits and the accumulators 26 bits. Outputs are 16-bit signed
with 2 fraction bits (value·4), obtained by flooring. The testbench checks
the outputs bit-exactly against an integer model and against the exact
real DHT to within ±1.5 (real units). Outputs reach about ±3700 for
full-scale input.

## CORDIC complex multiplier (`cordic_cmul`)

A DFT of a length that is not a prime needs a complex multiplication before
and after the cyclic convolution. The CORDIC does it with shifts and adds
only. It rotates (x, y) by theta:

    x' = x cos(theta) + y sin(theta),   y' = -x sin(theta) + y cos(theta)

theta is written as sum_i s_i atan(2^-i), i = 0..10, with each s_i = ±1.
The directions are worked out in advance for the wanted angle: the running
sum moves toward the target, adding atan(2^-i) while below it and
subtracting it while above. For 56 degrees this gives s_0..s_8 =
+ + - - + + + - -. The operand brings its 11 direction bits with it
(`in_s`, bit i = 1 for s_i = +1). Reachable angles are about ±99.8 degrees.

**Two stages on one adder pair.** First, 11 iterations, one per clock:
`x += s_i (y >>> i)`, `y -= s_i (x >>> i)`. This stretches the vector by
1/K, with K = prod cos(atan 2^-i) = 0.60725. Because every |s_i| is 1, K is
a constant. It is rounded to 39797/2^16 and written in canonical signed
digits:

    K = 2^-1 + 2^-3 - 2^-6 - 2^-9 - 2^-12 + 2^-14 + 2^-16

The scaling stage uses the same shifters and adders: one load and six
shifted adds, one digit per clock. The digits are derived during
elaboration from `M` and `KF`, so they follow a change of either.

**Timing and numbers.** Inputs are 16-bit signed. Internally the words
have 2 extra integer bits and 4 guard fraction bits. The output is 17-bit
signed (the result can be up to sqrt 2 times the input), floored. The
result is valid 18 clocks after the operand is taken (11 + 7). One operand
is taken every 19 clocks at most, and `in_ready` is low in between. The
testbench checks bit-exactly against an integer model and within ±2
against the exact rotation by sum_i s_i atan(2^-i).

## Top level and interfaces (`gda_dsst_top`)

| group | ports | notes |
|---|---|---|
| clock/reset | `clk`, `rst_n` | one clock; asynchronous active-low reset |
| DCT in | `dct_in_valid`, `dct_in_ready`, `dct_in_data[7:0]` | samples y(0)..y(6) in order, valid/ready handshake |
| DCT out | `dct_out_valid`, `dct_out_index[2:0]`, `dct_out_data[17:0]` | Y(k)·64 for k = index |
| DFT in | `dft_in_valid`, `dft_in_ready`, `dft_in_data[7:0]` | samples x(0)..x(10) in order |
| DFT out | `dft_out_valid`, `dft_out_index[3:0]`, `dft_out_re[15:0]`, `dft_out_im[15:0]` | Y(k)·16 |
| DHT in/out | `dht_in_*`, `dht_out_valid`, `dht_out_index[3:0]`, `dht_out_data[15:0]` | H(k)·16 |
| 29-point DHT in | `dht29_in_valid`, `dht29_in_ready`, `dht29_in_data[7:0]` | samples x(0)..x(28) in order |
| 29-point DHT out | `dht29_out_valid`, `dht29_out_index[4:0]`, `dht29_out_data[15:0]` | H(k)·4 |
| CORDIC in | `cordic_in_valid`, `cordic_in_ready`, `cordic_in_x[15:0]`, `cordic_in_y[15:0]`, `cordic_in_s[10:0]` | operand and direction bits |
| CORDIC out | `cordic_out_valid`, `cordic_out_x[16:0]`, `cordic_out_y[16:0]` | rotated vector |

A sample is taken on every clock where valid and ready are both high. The
outputs have no back-pressure: a result word is valid for one clock only.

## Departures and own choices

Taken from the source design:

* the GDA structure (decoder, group memory, barrel rotator,
  shift-accumulator);
* the prime-length reformulations;
* the 7-point DCT's recursive pre-processing, its single 3-point unit
  shared by the even and odd passes, 16-bit DA word, 32-cycle block rate,
  serial cosine multipliers and reordering output buffer;
* the 11-point DFT/DHT structure: input orderings, a cosine and a sine
  memory of 8 groups each, hard-wired combination of the two output
  halves;
* the 29-point DHT structure: 4 x 7 split of the 28-point convolution,
  four 7-point units with 20 groups each, rotation of the input blocks over
  four iterations;
* the CORDIC: elementary angles atan(2^-i) for 11 iterations, directions
  stored with the operand, constant scaling in canonical signed digits on
  the same shift-and-add unit.

Choices made here:

* **Group numbering.** Groups are numbered by increasing seed everywhere.
  The source's DCT and 29-point decoder tables list the same groups in a
  different order (the 29-point table sorts them by the number of ones).
  Both orders give the same results; only the memory row addresses differ.
* **Decoder as a table.** The decoder is a lookup table computed when the
  design is elaborated. No particular logic structure is prescribed for it.
* **Sine-side sign handling.** The alternating-sign trick that turns the
  11-point sine half into a cyclic convolution is this design's way of
  reaching the sign pattern the source describes.
* **Fixed point.** All word widths, the coefficient rounding (Q1.14 for
  the DCT, Q1.12 for the DFT/DHT and the 29-point DHT), the output
  scalings and the use of
  flooring were chosen here.
* **Handshakes and reset.** The valid/ready handshakes, the output
  index/valid format and the asynchronous reset were chosen here.
* **Serial multiplier.** The post-processing multiplier is a plain
  LSB-first shift-and-add design.
* **One accumulator bank for the 29-point DHT.** The four lookups are
  summed before accumulation instead of in four separate banks.
* **CORDIC datapath.** The CORDIC works on whole words with one iteration
  per clock. Its guard bits and its handshake were chosen here.
* **29-point DHT buffers.** The input shift register, holding register,
  collection register and output drain register are this design's own.

Not included:

* the other transform lengths the source evaluates (prime-length DCTs of
  5, 11 and 13 points; 5- and 7-point DFTs);
* the longer DHTs (841, 1653, 3249 points) composed from 29- and 57-point
  stages;
* the variable-length 64- to 4096-point DFT with its 3-D rotator and
  transpose memory;
* the non-prime-length DFT datapaths that would use the CORDIC.

The GDA unit itself is generic (N up to 8).

## Simulating

Every testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. With verilator 5:

    verilator --binary --timing --assert rtl/gda_pkg.sv rtl/*.sv \
        tb/tb_gda_dsst_top.sv --top-module tb_gda_dsst_top -Mdir obj -o sim
    ./obj/sim

Replace the testbench file and top module to run another one:

| testbench | what it checks |
|---|---|
| `tb_gda_dsst_top` | all four engines and the CORDIC at default parameters, 60 random blocks or operands each with random input gaps. It counts every mechanism (every group of the 3-, 5- and 7-bit decoders, non-zero rotations, even and odd passes, hard-wired output halves, all four 29-point iterations, both signs of every CORDIC direction, input back-pressure, idle input cycles) and fails if any never occurred |
| `tb_cordic_cmul` | the CORDIC: the 56-degree direction sequence, 300 random rotations bit-exact and against exact rotation, latency |
| `tb_dct7_gda`, `tb_p11_gda`, `tb_dht29_gda` | one engine, bit-exact and real-valued accuracy, block rate and latency |
| `tb_gda_addr_decoder` | every address for N = 3, 5, 7, and group counts 4, 8, 20 |
| `tb_gda_group_rom`, `tb_gda_barrel_rotator`, `tb_gda_accumulator`, `tb_gda_unit` | the GDA parts; the unit against a direct convolution for N = 3 and N = 7 |
| `tb_dct7_*`, `tb_p11_*` | each pipeline stage against its formula, including stage timing |

To change a transform, edit the coefficient tables in `gda_pkg`. The
memories and decoders follow automatically. `gda_unit` can be instantiated
directly for any other cyclic convolution of length 2 to 8.
